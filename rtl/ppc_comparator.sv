// ppc_comparator: scalable parallel-prefix magnitude comparator.
//
// Compares two unsigned N-bit operands. The comparison resolution module
// (ppc_resolution, sets 1-5) marks the most significant differing bit on the
// left bus (A bigger there) or the right bus (B bigger there); the decision
// module (cmp_decision) ORs each bus to give A>B, A<B or A=B. Both are built
// from cells of at most five inputs, so the depth grows only with the set-3
// prefix levels, ceil(log4(N/4)).
//
// Interface: a, b in; res = {gt, lt, eq} (exactly one high); the two buses are
// also brought out. Purely combinational, no clock or reset: the design is
// a combinational gate network and registers, if wanted, belong around it.
module ppc_comparator
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

  ppc_resolution #(.N(N)) u_resolution (
    .a(a), .b(b), .left_bus(left_bus), .right_bus(right_bus)
  );

  cmp_decision #(.N(N)) u_decision (
    .left_bus(left_bus), .right_bus(right_bus), .res(res)
  );

endmodule
