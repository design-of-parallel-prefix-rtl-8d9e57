// tb_ppc_resolution: self-check of the comparison resolution module.
// N = 8: every operand pair. N = 16 and N = 64: random pairs, most of them
// equal above a random bit so that the decision falls in every partition and
// set-3 level. Expected buses: scanning from the MSB, the first differing
// position k gets left=1 if A_k=1 (right=1 otherwise); all else is 0.
module tb_ppc_resolution;
  int checks = 0, failures = 0;

  logic [7:0]  a8,  b8,  l8,  r8;
  logic [15:0] a16, b16, l16, r16;
  logic [63:0] a64, b64, l64, r64;

  ppc_resolution #(.N(8))  dut8  (.a(a8),  .b(b8),  .left_bus(l8),  .right_bus(r8));
  ppc_resolution #(.N(16)) dut16 (.a(a16), .b(b16), .left_bus(l16), .right_bus(r16));
  ppc_resolution #(.N(64)) dut64 (.a(a64), .b(b64), .left_bus(l64), .right_bus(r64));

  task automatic check(input logic [63:0] a, input logic [63:0] b,
                       input logic [63:0] l, input logic [63:0] r, input int n);
    logic [63:0] el, er;
    el = '0; er = '0;
    for (int k = n - 1; k >= 0; k--) begin
      if (a[k] != b[k]) begin
        if (a[k]) el[k] = 1'b1; else er[k] = 1'b1;
        break;
      end
    end
    checks++;
    if (l !== el || r !== er) begin
      failures++;
      if (failures < 10) $display("FAIL N=%0d a=%h b=%h left=%h right=%h exp %h %h", n, a, b, l, r, el, er);
    end
  endtask

  function automatic logic [63:0] rnd64();
    return {$urandom(), $urandom()};
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; a64 = '0; b64 = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        #1;
        check(64'(a8), 64'(b8), 64'(l8), 64'(r8), 8);
      end
    for (int r = 0; r < 20000; r++) begin
      logic [63:0] x, y, m;
      int s;
      x = rnd64();
      y = rnd64();
      s = $urandom_range(64, 0);                  // keep bits above s equal
      m = (s >= 64) ? '0 : ('1 << s);
      y = (x & m) | (y & ~m);
      a64 = x; b64 = y;
      a16 = x[15:0];
      b16 = (s >= 16) ? x[15:0] : y[15:0];
      #1;
      check(a64, b64, l64, r64, 64);
      check(64'(a16), 64'(b16), 64'(l16), 64'(r16), 16);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
