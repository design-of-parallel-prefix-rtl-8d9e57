// tb_cmp_decision: self-check of the decision module at N = 8, N = 16 and
// N = 72 (18 groups, reduced through the four-input OR tree).
// Buses are driven with zero, one-hot and random patterns on each side.
// Expected: gt = any left bit, lt = any right bit, eq = neither.
module tb_cmp_decision;
  import cmp_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]  l8,  r8;
  logic [15:0] l16, r16;
  logic [71:0] l72, r72;
  cmp_result_t res8, res16, res72;

  cmp_decision #(.N(8))  dut8  (.left_bus(l8),  .right_bus(r8),  .res(res8));
  cmp_decision #(.N(16)) dut16 (.left_bus(l16), .right_bus(r16), .res(res16));
  cmp_decision #(.N(72)) dut72 (.left_bus(l72), .right_bus(r72), .res(res72));

  task automatic check(input logic [71:0] l, input logic [71:0] r, input cmp_result_t res, input int n);
    bit any_l, any_r;
    any_l = 0; any_r = 0;
    for (int k = 0; k < n; k++) begin
      if (l[k]) any_l = 1;
      if (r[k]) any_r = 1;
    end
    checks++;
    if (res.gt !== any_l || res.lt !== any_r || res.eq !== (!any_l && !any_r)) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d left=%h right=%h -> gt%b lt%b eq%b", n, l, r, res.gt, res.lt, res.eq);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // N = 8: all bus pairs.
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        l8 = 8'(i); r8 = 8'(j); l16 = '0; r16 = '0; l72 = '0; r72 = '0;
        #1;
        check(72'(l8), 72'(r8), res8, 8);
      end
    // N = 16: one-hot on either bus, then random.
    for (int k = -1; k < 16; k++) begin
      l16 = (k < 0) ? '0 : (16'd1 << k); r16 = '0;
      #1; check(72'(l16), 72'(r16), res16, 16);
      r16 = l16; l16 = '0;
      #1; check(72'(l16), 72'(r16), res16, 16);
    end
    for (int n = 0; n < 5000; n++) begin
      l16 = 16'($urandom()) & 16'($urandom()) & 16'($urandom());
      r16 = 16'($urandom()) & 16'($urandom()) & 16'($urandom());
      #1; check(72'(l16), 72'(r16), res16, 16);
    end
    // N = 72: zero, every one-hot position on either bus, then sparse random.
    l72 = '0; r72 = '0;
    #1; check(l72, r72, res72, 72);
    for (int k = 0; k < 72; k++) begin
      l72 = 72'd1 << k; r72 = '0;
      #1; check(l72, r72, res72, 72);
      r72 = l72; l72 = '0;
      #1; check(l72, r72, res72, 72);
    end
    for (int n = 0; n < 5000; n++) begin
      l72 = ($urandom_range(3, 0) == 0) ? (72'd1 << $urandom_range(71, 0)) : '0;
      r72 = ($urandom_range(3, 0) == 0) ? (72'd1 << $urandom_range(71, 0)) : '0;
      #1; check(l72, r72, res72, 72);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
