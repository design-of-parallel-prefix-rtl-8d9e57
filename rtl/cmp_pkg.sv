// cmp_pkg: types and constants shared by the comparator modules.
//
// Both comparators report their decision as a cmp_result_t, the three
// mutually exclusive flags A>B, A<B and A=B produced by the decision module.
// PART_W is the operand partition width: the prefix tree works on 4-bit
// partitions of the operands, and the decision module reduces each bus in
// 4-bit groups. num_levels4() gives how many fan-in-4 levels a tree over a
// given number of leaves needs; the set-3 network uses it.
package cmp_pkg;

  // Bits per operand partition (one set-2 cell and one OR group each).
  localparam int unsigned PART_W = 4;

  // Comparator decision. At most one flag is high for a correct comparison.
  typedef struct packed {
    logic gt;  // A > B  (L bit)
    logic lt;  // A < B  (R bit)
    logic eq;  // A = B  (neither L nor R)
  } cmp_result_t;

  // Number of radix-4 levels needed to combine n leaves (0 for n <= 1).
  function automatic int unsigned num_levels4(input int unsigned n);
    int unsigned lv;
    int unsigned span;
    lv   = 0;
    span = 1;
    while (span < n) begin
      span = span * 4;
      lv   = lv + 1;
    end
    return lv;
  endfunction

endpackage
