// ppc_set4_omega: set 4 of the parallel-prefix comparison resolution module.
//
// One cell per bit produces the select of that bit's set-5 multiplexer:
//   sel[k] = d[k] and no more significant bit of the same partition differs
//            and the partition is not terminated by set 3.
// So sel is one-hot at the most significant differing bit of the operands, or
// all zero when they are equal. Within a partition the cell of the top bit has
// two inputs (its own flag and term) and each lower bit one more, ending with
// five inputs at the partition's lowest bit, as in the design. Including the
// bit's own flag is this implementation's reading: set 5 passes (A_k,B_k)
// itself, so a selected position must be one where the bits differ.
//
// Interface: d from set 1, term from set 3 (one bit per 4-bit partition),
// sel to set 5. Purely combinational, one gate level.
module ppc_set4_omega
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]        d,
  input  logic [N/PART_W-1:0] term,
  output logic [N-1:0]        sel
);

  localparam int unsigned P = N / PART_W;

  for (genvar p = 0; p < P; p++) begin : g_part
    for (genvar j = 0; j < PART_W; j++) begin : g_omega
      localparam int unsigned K = PART_W * p + j;
      if (j == PART_W - 1) begin : g_top
        assign sel[K] = d[K] & ~term[p];
      end else begin : g_lower
        // Flags of the bits above position j within the partition.
        assign sel[K] = d[K] & ~term[p] & ~|d[PART_W*p+PART_W-1 : K+1];
      end
    end
  end

endmodule
