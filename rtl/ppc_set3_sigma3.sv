// ppc_set3_sigma3: set 3 of the parallel-prefix comparison resolution module.
//
// Spreads the partition results of set 2 from the most significant partition
// towards the least significant one: term[p] = 1 when some partition more
// significant than p is unequal, so partition p must put zeros on both buses.
// The most significant partition's flag is the constant 0.
//
// Every cell has at most four inputs, whatever the width; when there are more
// than four partitions the network grows extra levels. The arrangement of those
// levels is this implementation's choice, a radix-4 tree:
//   * upward: a level-l group is 4 level-(l-1) groups; its "unequal" flag is
//     the OR of theirs (uneq[l][g], fan-in 4);
//   * downward: a group's terminate flag is its parent group's flag ORed with
//     the unequal flags of its more significant siblings (fan-in 1 + 3).
// With P <= 4 partitions this is one level: term[p] = OR of the unequal flags
// of partitions p+1 .. P-1.
//
// Interface: part_eq[p] from set 2 (1 = partition p equal); term[p] to set 4.
// Purely combinational; depth 2*ceil(log4 P) - 1 cells.
module ppc_set3_sigma3
  import cmp_pkg::*;
#(
  parameter int unsigned P = 2
) (
  input  logic [P-1:0] part_eq,
  output logic [P-1:0] term
);

  localparam int unsigned L = num_levels4(P);  // tree levels
  localparam int unsigned W = 4 ** L;          // leaves, padded to a power of 4

  if (L == 0) begin : g_single
    // A single partition is the most significant one: never terminated.
    assign term = '0;
  end else begin : g_tree
    logic [W-1:0] uneq  [L];     // uneq[l][g]: level-l group g holds an unequal bit
    logic [W-1:0] tflag [L+1];   // tflag[l][g]: level-l group g is terminated

    // Level 0: one leaf per partition; padding leaves are equal.
    for (genvar p = 0; p < W; p++) begin : g_leaf
      if (p < P) begin : g_real
        assign uneq[0][p] = ~part_eq[p];
      end else begin : g_pad
        assign uneq[0][p] = 1'b0;
      end
    end

    // Upward OR of groups of four, levels 1 .. L-1.
    for (genvar l = 1; l < L; l++) begin : g_up
      for (genvar g = 0; g < W; g++) begin : g_grp
        if (g < (W >> (2 * l))) begin : g_used
          assign uneq[l][g] = |uneq[l-1][4*g +: 4];
        end else begin : g_unused
          assign uneq[l][g] = 1'b0;
        end
      end
    end

    // Root: the most significant group is never terminated.
    assign tflag[L] = '0;

    // Downward: parent flag OR unequal flags of more significant siblings.
    for (genvar i = 0; i < L; i++) begin : g_down
      localparam int unsigned l = L - 1 - i;
      for (genvar g = 0; g < W; g++) begin : g_grp
        if (g < (W >> (2 * l))) begin : g_used
          localparam int unsigned J = g % 4;
          localparam logic [3:0] ABOVE = 4'(4'b1111 << (J + 1));
          assign tflag[l][g] = tflag[l+1][g/4] | |(uneq[l][4*(g/4) +: 4] & ABOVE);
        end else begin : g_unused
          assign tflag[l][g] = 1'b0;
        end
      end
    end

    assign term = tflag[0][P-1:0];
  end

endmodule
