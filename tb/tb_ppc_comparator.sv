// tb_ppc_comparator: self-check of the parallel-prefix comparator.
// N = 8: every operand pair; N = 32 and N = 128: random pairs that agree
// above a random bit. Checks res against the unsigned comparison of the
// operands, the buses against "only the most significant differing bit",
// and that exactly one decision flag is high.
module tb_ppc_comparator;
  import cmp_pkg::*;
  int checks = 0, failures = 0;

  logic [7:0]   a8,   b8,   l8,   r8;
  logic [31:0]  a32,  b32,  l32,  r32;
  logic [127:0] a128, b128, l128, r128;
  cmp_result_t  res8, res32, res128;

  ppc_comparator #(.N(8))   dut8   (.a(a8),   .b(b8),   .res(res8),   .left_bus(l8),   .right_bus(r8));
  ppc_comparator #(.N(32))  dut32  (.a(a32),  .b(b32),  .res(res32),  .left_bus(l32),  .right_bus(r32));
  ppc_comparator #(.N(128)) dut128 (.a(a128), .b(b128), .res(res128), .left_bus(l128), .right_bus(r128));

  task automatic check(input logic [127:0] a, input logic [127:0] b, input cmp_result_t res,
                       input logic [127:0] l, input logic [127:0] r, input int n);
    logic [127:0] el, er;
    el = '0; er = '0;
    for (int k = n - 1; k >= 0; k--)
      if (a[k] != b[k]) begin
        if (a[k]) el[k] = 1'b1; else er[k] = 1'b1;
        break;
      end
    checks++;
    if (res.gt !== (a > b) || res.lt !== (a < b) || res.eq !== (a == b)) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d a=%h b=%h res gt%b lt%b eq%b", n, a, b, res.gt, res.lt, res.eq);
    end
    checks++;
    if (l !== el || r !== er) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d a=%h b=%h buses %h %h", n, a, b, l, r);
    end
  endtask

  function automatic logic [127:0] rnd128();
    return {$urandom(), $urandom(), $urandom(), $urandom()};
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a32 = '0; b32 = '0; a128 = '0; b128 = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        check(128'(a8), 128'(b8), res8, 128'(l8), 128'(r8), 8);
      end
    for (int n = 0; n < 20000; n++) begin
      logic [127:0] x, y, m;
      int s;
      x = rnd128();
      y = rnd128();
      s = $urandom_range(128, 0);
      m = (s >= 128) ? '0 : ('1 << s);
      y = (x & m) | (y & ~m);
      a128 = x; b128 = y;
      a32 = x[31:0];
      b32 = (s >= 32) ? x[31:0] : y[31:0];
      #1;
      check(a128, b128, res128, l128, r128, 128);
      check(128'(a32), 128'(b32), res32, 128'(l32), 128'(r32), 32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
