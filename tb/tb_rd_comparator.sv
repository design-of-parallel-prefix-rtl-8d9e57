// tb_rd_comparator: exhaustive self-check of the reduced 8-bit comparator.
// For every operand pair: eq must equal (A == B); gt must be 1 exactly when
// some bit has A_k = 1, B_k = 0; lt exactly when some bit has A_k = 0, B_k = 1.
// Whenever only one of gt, lt is high it must also agree with A > B / A < B.
// The run counts how many pairs leave the order unresolved (gt = lt = 1).
module tb_rd_comparator;
  import cmp_pkg::*;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, lb, rb;
  cmp_result_t  res;
  int checks = 0, failures = 0, unresolved = 0;

  rd_comparator #(.N(N)) dut (.a(a), .b(b), .res(res), .left_bus(lb), .right_bus(rb));

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
        bit a_over, b_over;
        a = N'(i); b = N'(j);
        #1;
        a_over = ((i & ~j) & 32'hFF) != 0;
        b_over = ((~i & j) & 32'hFF) != 0;
        checks++;
        if (res.eq !== (i == j) || res.gt !== a_over || res.lt !== b_over) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h -> gt%b lt%b eq%b", a, b, res.gt, res.lt, res.eq);
        end
        if (res.gt != res.lt) begin
          checks++;
          if (res.gt !== (i > j)) begin
            failures++;
            if (failures < 10) $display("FAIL order a=%h b=%h gt%b", a, b, res.gt);
          end
        end
        if (res.gt && res.lt) unresolved++;
      end
    $display("pairs with the order unresolved: %0d of %0d", unresolved, 1 << (2 * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
