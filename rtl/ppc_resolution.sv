// ppc_resolution: comparison resolution module of the parallel-prefix
// comparator (sets 1 to 5).
//
// Encodes the comparison of the N-bit operands A and B onto two N-bit buses.
// Scanning from the MSB, positions where A and B agree give 00; the first
// position k where they differ gives left_bus[k] = 1 if A_k > B_k or
// right_bus[k] = 1 if A_k < B_k; every position below it is forced to 00.
// At most one bit is therefore high on the two buses together.
//
// The five sets follow the design, each a single level of small cells working
// in parallel:
//   set 1  per-bit termination flag d (bits differ)
//   set 2  per-partition NOR of the four flags (partition equal)
//   set 3  prefix network: some more significant partition is unequal
//   set 4  per-bit mux select (bit differs, nothing above it differs)
//   set 5  per-bit 2-bit mux: (A_k, B_k) or 00 onto the buses
// Operands are cut into 4-bit partitions, so N must be a multiple of 4.
//
// Interface: a, b in; left_bus, right_bus out. Purely combinational.
module ppc_resolution
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] left_bus,
  output logic [N-1:0] right_bus
);

  localparam int unsigned P = N / PART_W;

  logic [N-1:0] d;        // set 1 -> sets 2 and 4
  logic [P-1:0] part_eq;  // set 2 -> set 3
  logic [P-1:0] term;     // set 3 -> set 4
  logic [N-1:0] sel;      // set 4 -> set 5

  ppc_set1_psi    #(.N(N)) u_set1 (.a(a), .b(b), .d(d));
  ppc_set2_sigma2 #(.N(N)) u_set2 (.d(d), .part_eq(part_eq));
  ppc_set3_sigma3 #(.P(P)) u_set3 (.part_eq(part_eq), .term(term));
  ppc_set4_omega  #(.N(N)) u_set4 (.d(d), .term(term), .sel(sel));
  ppc_set5_mux    #(.N(N)) u_set5 (.a(a), .b(b), .sel(sel),
                                   .left_bus(left_bus), .right_bus(right_bus));

endmodule
