// rd_comparator: reduced 8-bit comparator variant.
//
// The reduced resolution module (rd_resolution, per-bit cells only) feeds
// the same decision module as the parallel-prefix comparator. Its outputs:
//   eq = 1           A = B (always exact)
//   gt = 1, lt = 0   A > B (every differing bit has A_k = 1)
//   lt = 1, gt = 0   A < B (every differing bit has B_k = 1)
//   gt = 1, lt = 1   the operands differ in both directions; this circuit
//                    does not resolve which is larger.
// The structure (reduced resolution, unchanged decision module, 8 bits)
// follows the design; the last row is a consequence of it, kept as is.
//
// Interface: a, b in; res = {gt, lt, eq}; both buses out. Combinational.
module rd_comparator
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output cmp_result_t  res,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  rd_resolution #(.N(N)) u_resolution (
    .a(a), .b(b), .left_bus(left_bus), .right_bus(right_bus)
  );

  cmp_decision #(.N(N)) u_decision (
    .left_bus(left_bus), .right_bus(right_bus), .res(res)
  );

endmodule
