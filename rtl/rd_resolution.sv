// rd_resolution: reduced comparison resolution module of the 8-bit
// comparator variant (the smaller circuit the design compares against the
// parallel-prefix one).
//
// Each bit position has its own cell only: left_bus[k] = A_k and not B_k,
// right_bus[k] = not A_k and B_k (one inverter and one two-input gate per bus
// bit, 16 of each at N = 8). There is no prefix tree, so positions below the
// most significant difference are not forced to 0: several bits can be high
// on each bus, and both buses can have bits high when the operands differ in
// both directions. The per-bit structure follows the design's drawing; the
// exact gate functions are this implementation's reading of it.
//
// Interface: a, b in; left_bus, right_bus out. Purely combinational.
module rd_resolution #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  for (genvar k = 0; k < N; k++) begin : g_bit
    assign left_bus[k]  = a[k] & ~b[k];
    assign right_bus[k] = ~a[k] & b[k];
  end

endmodule
