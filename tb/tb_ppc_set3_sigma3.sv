// tb_ppc_set3_sigma3: self-check of the set-3 prefix network.
// Instances with 2 (the 8-bit default), 4, 5, 16 and 21 partitions cover one,
// two and three tree levels and padded trees. Each gets exhaustive inputs
// when small, random and single-unequal-partition patterns otherwise.
// term[p] must be 1 exactly when some partition above p is unequal.
module tb_ppc_set3_sigma3;
  int checks = 0, failures = 0;

  logic [1:0]  eq2,  t2;
  logic [3:0]  eq4,  t4;
  logic [4:0]  eq5,  t5;
  logic [15:0] eq16, t16;
  logic [20:0] eq21, t21;

  ppc_set3_sigma3 #(.P(2))  dut2  (.part_eq(eq2),  .term(t2));
  ppc_set3_sigma3 #(.P(4))  dut4  (.part_eq(eq4),  .term(t4));
  ppc_set3_sigma3 #(.P(5))  dut5  (.part_eq(eq5),  .term(t5));
  ppc_set3_sigma3 #(.P(16)) dut16 (.part_eq(eq16), .term(t16));
  ppc_set3_sigma3 #(.P(21)) dut21 (.part_eq(eq21), .term(t21));

  // Expected flag for partition p given the equal flags (bit q of v).
  function automatic bit exp_term(input logic [31:0] v, input int p, input int np);
    for (int q = p + 1; q < np; q++) if (!v[q]) return 1'b1;
    return 1'b0;
  endfunction

  task automatic check(input logic [31:0] v, input logic [31:0] t, input int np);
    for (int p = 0; p < np; p++) begin
      checks++;
      if (t[p] !== exp_term(v, p, np)) begin
        failures++;
        if (failures < 10) $display("FAIL P=%0d part_eq=%h partition %0d term=%b", np, v, p, t[p]);
      end
    end
  endtask

  task automatic apply(input logic [31:0] v);
    eq2 = v[1:0]; eq4 = v[3:0]; eq5 = v[4:0]; eq16 = v[15:0]; eq21 = v[20:0];
    #1;
    check(32'(eq2), 32'(t2), 2);
    check(32'(eq4), 32'(t4), 4);
    check(32'(eq5), 32'(t5), 5);
    check(32'(eq16), 32'(t16), 16);
    check(32'(eq21), 32'(t21), 21);
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) apply(32'(v) | 32'hFFFF_FFE0);   // small trees exhaustive
    for (int u = 0; u < 32; u++) apply(~(32'd1 << u));            // one unequal partition
    apply('1);                                                    // all equal
    apply('0);                                                    // all unequal
    for (int r = 0; r < 20000; r++) begin                         // random, mostly equal
      logic [31:0] v;
      v = $urandom() | $urandom() | $urandom();
      apply(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
