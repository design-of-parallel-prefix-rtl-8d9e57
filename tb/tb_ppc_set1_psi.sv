// tb_ppc_set1_psi: exhaustive self-check of the set-1 cells at N = 8.
// Every pair of operands is applied; the flag for each bit must be 1 exactly
// when the two operand bits differ. A time-based watchdog ends a hung run.
module tb_ppc_set1_psi;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, d;
  int checks = 0, failures = 0;

  ppc_set1_psi #(.N(N)) dut (.a(a), .b(b), .d(d));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i); b = N'(j);
        #1;
        for (int k = 0; k < N; k++) begin
          checks++;
          if (d[k] !== (((i >> k) & 1) != ((j >> k) & 1))) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h bit %0d d=%b", a, b, k, d[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
