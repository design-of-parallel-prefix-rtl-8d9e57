// comparator_top: both comparators of the design side by side.
//
// The same operands drive the scalable parallel-prefix comparator
// (ppc_comparator, the main structure) and the reduced comparator variant
// (rd_comparator). Each brings out its own decision and its two buses, so the
// two can be compared bit for bit. Sharing the operand inputs is this
// implementation's choice; the design evaluates the two as separate circuits.
//
// Interface: a, b in (N bits, N a multiple of 4, default 8 as in the
// evaluated circuits); pp_* outputs of the parallel-prefix comparator, rd_*
// outputs of the reduced one. Purely combinational, no clock or reset.
module comparator_top
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output cmp_result_t  pp_res,
  output logic [N-1:0] pp_left_bus,
  output logic [N-1:0] pp_right_bus,
  output cmp_result_t  rd_res,
  output logic [N-1:0] rd_left_bus,
  output logic [N-1:0] rd_right_bus
);

  ppc_comparator #(.N(N)) u_ppc (
    .a(a), .b(b), .res(pp_res), .left_bus(pp_left_bus), .right_bus(pp_right_bus)
  );

  rd_comparator #(.N(N)) u_rd (
    .a(a), .b(b), .res(rd_res), .left_bus(rd_left_bus), .right_bus(rd_right_bus)
  );

endmodule
