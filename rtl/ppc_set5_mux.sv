// ppc_set5_mux: set 5 of the parallel-prefix comparison resolution module.
//
// One 2-bit-wide, two-input multiplexer per bit position. When its select is
// high it drives the operand bits (A_k, B_k) onto (left_bus[k], right_bus[k]);
// otherwise it drives the hardwired code 00. Because set 4 selects only the
// most significant differing position, at most one bit is high on the two
// buses together: left means A_k > B_k there, right means A_k < B_k.
// This follows the design directly.
//
// Interface: a, b operands; sel from set 4; the two N-bit buses out.
// Purely combinational, one gate level.
module ppc_set5_mux #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] sel,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  for (genvar k = 0; k < N; k++) begin : g_mux
    assign {left_bus[k], right_bus[k]} = sel[k] ? {a[k], b[k]} : 2'b00;
  end

endmodule
