// cmp_decision: decision module shared by both comparators.
//
// Two OR networks scan the buses: L = OR of all left-bus bits, R = OR of all
// right-bus bits. LR = 10 means A > B, 01 means A < B, 00 means A = B. The
// parallel-prefix resolution module never produces 11; the reduced resolution
// module can, and then both gt and lt are reported high and eq low.
//
// As in the design, each bus is first reduced in 4-bit groups (one NOR per
// group, fan-in four). The group results are then combined per bus: up to
// four groups in one gate (a NAND of the group NORs, i.e. an OR; two inputs
// at N = 8), more groups through a tree of four-input ORs so that no gate
// exceeds fan-in four at any width. The tree for wide buses is this
// implementation's choice. eq is the complement of (L or R).
//
// Interface: left_bus, right_bus in (N a multiple of 4); res = {gt, lt, eq}.
// Purely combinational; 3 gate levels up to N = 16, one more per factor of 4.
module cmp_decision
  import cmp_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0] left_bus,
  input  logic [N-1:0] right_bus,
  output cmp_result_t  res
);

  localparam int unsigned P = N / PART_W;

  logic [P-1:0] left_none;   // group NOR: no left bit set in the group
  logic [P-1:0] right_none;  // group NOR: no right bit set in the group
  logic         l_bit, r_bit;

  for (genvar p = 0; p < P; p++) begin : g_group
    assign left_none[p]  = ~|left_bus[PART_W*p +: PART_W];
    assign right_none[p] = ~|right_bus[PART_W*p +: PART_W];
  end

  if (P <= 4) begin : g_flat
    assign l_bit = ~&left_none;   // NAND of group NORs = OR of the bus
    assign r_bit = ~&right_none;
  end else begin : g_tree
    // Radix-4 OR tree over the group "bus has a 1" flags.
    localparam int unsigned L = num_levels4(P);
    localparam int unsigned W = 4 ** L;
    logic [W-1:0] lv_l [L+1];
    logic [W-1:0] lv_r [L+1];
    for (genvar g = 0; g < W; g++) begin : g_leaf
      if (g < P) begin : g_real
        assign lv_l[0][g] = ~left_none[g];
        assign lv_r[0][g] = ~right_none[g];
      end else begin : g_pad
        assign lv_l[0][g] = 1'b0;
        assign lv_r[0][g] = 1'b0;
      end
    end
    for (genvar l = 1; l <= L; l++) begin : g_lvl
      for (genvar g = 0; g < W; g++) begin : g_node
        if (g < (W >> (2 * l))) begin : g_used
          assign lv_l[l][g] = |lv_l[l-1][4*g +: 4];
          assign lv_r[l][g] = |lv_r[l-1][4*g +: 4];
        end else begin : g_unused
          assign lv_l[l][g] = 1'b0;
          assign lv_r[l][g] = 1'b0;
        end
      end
    end
    assign l_bit = lv_l[L][0];
    assign r_bit = lv_r[L][0];
  end

  assign res.gt = l_bit;
  assign res.lt = r_bit;
  assign res.eq = ~(l_bit | r_bit);

endmodule
