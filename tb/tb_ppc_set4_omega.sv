// tb_ppc_set4_omega: self-check of the set-4 select cells at N = 16.
// All flag vectors are applied with several terminate patterns. sel[k] must
// be 1 exactly when d[k] is 1, the partition's terminate flag is 0 and no
// higher bit of the same partition has its flag set.
module tb_ppc_set4_omega;
  localparam int unsigned N = 16;
  localparam int unsigned P = N / 4;
  logic [N-1:0] d, sel;
  logic [P-1:0] term;
  int checks = 0, failures = 0;

  ppc_set4_omega #(.N(N)) dut (.d(d), .term(term), .sel(sel));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < (1 << P); t += 5) begin   // terminate patterns 0,5,10,15
      term = P'(t);
      for (int v = 0; v < (1 << N); v++) begin
        d = N'(v);
        #1;
        for (int k = 0; k < N; k++) begin
          bit e;
          int top;
          top = (k / 4) * 4 + 3;
          e = d[k] && !term[k/4];
          for (int j = k + 1; j <= top; j++) if (d[j]) e = 1'b0;
          checks++;
          if (sel[k] !== e) begin
            failures++;
            if (failures < 10) $display("FAIL d=%h term=%b bit %0d sel=%b", d, term, k, sel[k]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
