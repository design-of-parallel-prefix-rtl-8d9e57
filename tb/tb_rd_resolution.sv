// tb_rd_resolution: exhaustive self-check of the reduced resolution module
// at N = 8. For every operand pair and bit: left = 1 exactly where A_k = 1 and
// B_k = 0, right = 1 exactly where A_k = 0 and B_k = 1.
module tb_rd_resolution;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, lb, rb;
  int checks = 0, failures = 0;

  rd_resolution #(.N(N)) dut (.a(a), .b(b), .left_bus(lb), .right_bus(rb));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i); b = N'(j);
        #1;
        for (int k = 0; k < N; k++) begin
          bit ak, bk;
          ak = 1'((i >> k) & 1);
          bk = 1'((j >> k) & 1);
          checks++;
          if (lb[k] !== (ak == 1 && bk == 0) || rb[k] !== (ak == 0 && bk == 1)) begin
            failures++;
            if (failures < 10) $display("FAIL a=%h b=%h bit %0d -> %b%b", a, b, k, lb[k], rb[k]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
