// tb_ppc_set5_mux: self-check of the set-5 multiplexers at N = 8.
// Random operands and selects; where sel[k] is 1 the buses must carry
// (A_k, B_k), elsewhere 00.
module tb_ppc_set5_mux;
  localparam int unsigned N = 8;
  logic [N-1:0] a, b, sel, lb, rb;
  int checks = 0, failures = 0;

  ppc_set5_mux #(.N(N)) dut (.a(a), .b(b), .sel(sel), .left_bus(lb), .right_bus(rb));

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 20000; r++) begin
      a = N'($urandom()); b = N'($urandom()); sel = N'($urandom());
      #1;
      for (int k = 0; k < N; k++) begin
        checks++;
        if (sel[k] ? (lb[k] !== a[k] || rb[k] !== b[k]) : (lb[k] !== 1'b0 || rb[k] !== 1'b0)) begin
          failures++;
          if (failures < 10) $display("FAIL a=%h b=%h sel=%h bit %0d -> %b%b", a, b, sel, k, lb[k], rb[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
