// ppc_set2_sigma2: set 2 of the parallel-prefix comparison resolution module.
//
// One cell per 4-bit partition of the operands. Each cell NORs the four
// set-1 termination flags of its partition: part_eq[p] = 1 means all four
// bits of partition p are equal, so the comparison continues into less
// significant partitions; 0 means the partition decides the result and the
// lower partitions are terminated (through set 3). The NOR with fan-in four
// follows the design.
//
// Interface: d is the N-bit flag vector from set 1 (N a multiple of 4);
// part_eq has one bit per partition, bit p covering d[4p+3:4p].
// Purely combinational, one gate level.
module ppc_set2_sigma2
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]        d,
  output logic [N/PART_W-1:0] part_eq
);

  localparam int unsigned P = N / PART_W;

  if (N % PART_W != 0 || N == 0) begin : g_bad_width
    $error("ppc_set2_sigma2: N must be a non-zero multiple of 4");
  end

  for (genvar p = 0; p < P; p++) begin : g_sigma2
    assign part_eq[p] = ~(d[PART_W*p] | d[PART_W*p+1] | d[PART_W*p+2] | d[PART_W*p+3]);
  end

endmodule
