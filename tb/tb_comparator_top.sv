// tb_comparator_top: end-to-end self-check of comparator_top at its default
// width (N = 8), applying every one of the 65,536 operand pairs.
//
// Parallel-prefix comparator: res must match the unsigned comparison and the
// buses must hold only the most significant differing bit. Reduced variant:
// eq exact, gt/lt = "some bit favours A/B". The worked example of the design
// (A = 01011101, B = 01101001, decided at bit 5 in favour of B) is checked
// first. Each mechanism of the design is counted and must occur:
//   decided in the most significant partition, decided in a lower partition
//   after the upper one was equal, a lower partition silenced by set 3,
//   a lower bit in the same partition silenced by set 4, A=B, A>B, A<B, and
//   the reduced variant leaving the order unresolved (LR = 11).
module tb_comparator_top;
  import cmp_pkg::*;
  localparam int unsigned N = 8;

  logic [N-1:0] a, b, pp_l, pp_r, rd_l, rd_r;
  cmp_result_t  pp_res, rd_res;
  int checks = 0, failures = 0;
  int n_eq = 0, n_gt = 0, n_lt = 0, n_top_part = 0, n_low_part = 0;
  int n_set3_kill = 0, n_set4_kill = 0, n_rd_unresolved = 0;

  comparator_top dut (
    .a(a), .b(b),
    .pp_res(pp_res), .pp_left_bus(pp_l), .pp_right_bus(pp_r),
    .rd_res(rd_res), .rd_left_bus(rd_l), .rd_right_bus(rd_r)
  );

  task automatic expect_bit(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s a=%b b=%b", what, a, b);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Worked example: bits 7 and 6 equal, bit 5 has A=0, B=1.
    a = 8'b0101_1101; b = 8'b0110_1001;
    #1;
    expect_bit(pp_l == 8'b0000_0000, "example left bus");
    expect_bit(pp_r == 8'b0010_0000, "example right bus");
    expect_bit(pp_res.lt && !pp_res.gt && !pp_res.eq, "example decision A<B");

    for (int i = 0; i < (1 << N); i++)
      for (int j = 0; j < (1 << N); j++) begin
        int msd;                       // most significant differing bit, -1 if none
        logic [N-1:0] el, er, diff;
        a = N'(i); b = N'(j);
        #1;
        diff = a ^ b;
        msd = -1;
        for (int k = N - 1; k >= 0; k--) if (diff[k]) begin msd = k; break; end
        el = '0; er = '0;
        if (msd >= 0) begin
          if (a[msd]) el[msd] = 1'b1; else er[msd] = 1'b1;
        end
        // parallel-prefix comparator
        expect_bit(pp_res.gt == (i > j) && pp_res.lt == (i < j) && pp_res.eq == (i == j), "pp decision");
        expect_bit(pp_l == el && pp_r == er, "pp buses");
        // reduced comparator
        expect_bit(rd_res.eq == (i == j), "rd eq");
        expect_bit(rd_res.gt == ((a & ~b) != 0) && rd_res.lt == ((~a & b) != 0), "rd gt/lt");
        expect_bit(rd_l == (a & ~b) && rd_r == (~a & b), "rd buses");
        // mechanism counters
        if (i == j) n_eq++;
        if (i > j)  n_gt++;
        if (i < j)  n_lt++;
        if (msd >= 4) n_top_part++;
        if (msd >= 0 && msd < 4) n_low_part++;
        if (msd >= 4 && diff[3:0] != 0) n_set3_kill++;
        if (msd >= 0) begin
          // bits below msd in the same partition
          logic [N-1:0] same_part_below;
          same_part_below = ((N'(1) << msd) - 1) & ~((N'(1) << (msd - msd % 4)) - 1);
          if ((diff & same_part_below) != 0) n_set4_kill++;
        end
        if (rd_res.gt && rd_res.lt) n_rd_unresolved++;
      end

    $display("A=B %0d  A>B %0d  A<B %0d", n_eq, n_gt, n_lt);
    $display("decided in top partition %0d, in lower partition %0d", n_top_part, n_low_part);
    $display("lower partition silenced by set 3: %0d, lower bits silenced by set 4: %0d", n_set3_kill, n_set4_kill);
    $display("reduced variant unresolved (LR=11): %0d", n_rd_unresolved);
    if (n_eq == 0 || n_gt == 0 || n_lt == 0 || n_top_part == 0 || n_low_part == 0 ||
        n_set3_kill == 0 || n_set4_kill == 0 || n_rd_unresolved == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
