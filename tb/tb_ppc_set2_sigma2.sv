// tb_ppc_set2_sigma2: self-check of the set-2 partition cells at N = 16.
// All 2^16 flag vectors are applied; part_eq[p] must be 1 exactly when the
// four flags of partition p are all 0.
module tb_ppc_set2_sigma2;
  localparam int unsigned N = 16;
  localparam int unsigned P = N / 4;
  logic [N-1:0] d;
  logic [P-1:0] part_eq;
  int checks = 0, failures = 0;

  ppc_set2_sigma2 #(.N(N)) dut (.d(d), .part_eq(part_eq));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      d = N'(v);
      #1;
      for (int p = 0; p < P; p++) begin
        bit all_zero;
        all_zero = 1'b1;
        for (int j = 0; j < 4; j++) if (d[4*p+j]) all_zero = 1'b0;
        checks++;
        if (part_eq[p] !== all_zero) begin
          failures++;
          if (failures < 10) $display("FAIL d=%h partition %0d part_eq=%b", d, p, part_eq[p]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
