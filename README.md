# Parallel-prefix CMOS magnitude comparator

This is a combinational comparator for two unsigned N-bit numbers A and B. It
reports A > B, A < B or A = B. The comparator looks for the **most significant
bit position where A and B differ**. That position alone decides the result.
Every position below it is switched off, so the lower bits cause no activity.

The comparison is split into two stages:

1. **Comparison resolution.** This stage produces two N-bit buses, the *left
   bus* and the *right bus*. Starting at the MSB:
   - positions where A and B agree give `00`;
   - the first position k where they differ gives `left[k]=1` if A_k=1, or
     `right[k]=1` if B_k=1;
   - every position below k is forced to `00`.

   So the two buses together never hold more than one 1.
2. **Decision.** Each bus is ORed into one bit: L from the left bus, R from the
   right bus. `LR = 10` means A > B, `01` means A < B and `00` means A = B.

Most of the effort goes into making stage 1 fast at any width. It uses a
parallel-prefix tree of small cells. No cell has more than five inputs. Each
cell level works on all bit positions at once, and no signal has to reach the
whole word. Only the number of levels in one part of the tree grows with N,
and it grows as log4.

The design also contains a smaller 8-bit variant, described in the section on
the reduced comparator below. It uses the same decision stage, but its
resolution stage has only per-bit cells. It is cheaper, but it does not always
resolve the order.

Everything is purely combinational. There is no clock and no reset. If you
need a pipelined comparator, put registers around `ppc_comparator`.

## Worked example

Take A = `0101_1101` and B = `0110_1001`.

| bit | 7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|-----|---|---|---|---|---|---|---|---|
| A   | 0 | 1 | 0 | 1 | 1 | 1 | 0 | 1 |
| B   | 0 | 1 | 1 | 0 | 1 | 0 | 0 | 1 |
| left  | 0 | 0 | 0 | 0 | 0 | 0 | 0 | 0 |
| right | 0 | 0 | 1 | 0 | 0 | 0 | 0 | 0 |

- Bits 7 and 6 agree.
- At bit 5, B has the 1. That puts a 1 on the right bus.
- Bits 4 and 2 also differ, but they are below bit 5, so they are forced to 0.
- The result is L = 0 and R = 1, so A < B (93 < 105).

`tb_comparator_top` checks this case first.

## The five cell sets of the resolution module

The operand is cut into **partitions of 4 bits**, so N must be a multiple of
4. Partition p holds bits `4p+3 … 4p`. Partition N/4-1 is the most significant
one. The resolution module (`ppc_resolution`) is built from five sets of cells.
Each set feeds the next, and set 1 also feeds set 4.

| set | module | one cell per | output |
|-----|--------|--------------|--------|
| 1 | `ppc_set1_psi`    | bit       | `d[k] = A_k xor B_k`: this bit differs, so stop here |
| 2 | `ppc_set2_sigma2` | partition | `part_eq[p] = NOR(d[4p+3:4p])`: the whole partition is equal |
| 3 | `ppc_set3_sigma3` | partition | `term[p]`: some more significant partition differs |
| 4 | `ppc_set4_omega`  | bit       | `sel[k]`: this bit is the most significant difference |
| 5 | `ppc_set5_mux`    | bit       | `{left[k],right[k]} = sel[k] ? {A_k,B_k} : 00` |

### Set 4: the select cells

For a bit at position j inside partition p (j = 3 is the partition's top bit):

```
sel[k] = d[k] & ~term[p] & ~d[4p+3] & ... & ~d[k+1]
```

So the select is high only where three things hold: the bit differs, nothing
above it in the same partition differs, and no higher partition has already
decided the result.

- The number of inputs grows down the partition: 2, 3, 4, then 5 at the
  partition's lowest bit. This matches the 2- to 5-input cell names of the
  published 8-bit schematic.
- The select includes the bit's own flag `d[k]`. Set 5 passes the raw operand
  bits, so without this term two equal 1 bits would put `11` on the buses.

### Set 3: the partition prefix network

`term[p]` must be the OR of the "unequal" flags of every partition above p.
For the most significant partition it is the constant 0.

- **Up to 4 partitions (N ≤ 16):** this is one level of cells, each with at
  most three inputs. At the default N = 8 there are two partitions. Then
  `term[0] = ~part_eq[1]` and `term[1] = 0`, which is why one of the two
  outputs is constant.
- **More partitions:** a cell may have at most four inputs, so the network
  gets extra levels. It is a radix-4 tree:
  - **Upward pass:** groups of four partitions form a level-1 group, groups
    of four level-1 groups form a level-2 group, and so on. Each group's
    "unequal" flag is the OR of its four children.
  - **Downward pass:** a group's terminate flag is its parent's terminate
    flag ORed with the unequal flags of its more significant siblings. That
    is at most 1 + 3 inputs. The root's flag is 0.

  The total depth is 2·⌈log4(N/4)⌉ − 1 cells. At N = 64 (16 partitions)
  that is 3, and at N = 128 it is 5.

### Decision module

`cmp_decision` reduces each bus in 4-bit groups, one 4-input NOR per group.
It then combines the group results:

- With up to four groups, one gate per bus combines them. It is a NAND of the
  group NORs, which equals the OR of the bus.
- With more groups, a radix-4 OR tree combines them.

`eq` is the complement of (L or R). The decision is returned as
`cmp_pkg::cmp_result_t` with the fields `{gt, lt, eq}`.

## The reduced 8-bit comparator

`rd_comparator` keeps the decision module unchanged. Its resolution module is
replaced by `rd_resolution`, which has only per-bit cells:

```
left[k]  = A_k & ~B_k
right[k] = ~A_k & B_k
```

Without sets 2 to 5, nothing stops lower positions from reaching the buses.
The outputs therefore mean:

| gt | lt | eq | meaning |
|----|----|----|---------|
| 0 | 0 | 1 | A = B (always exact) |
| 1 | 0 | 0 | every differing bit has A_k = 1, so A > B |
| 0 | 1 | 0 | every differing bit has B_k = 1, so A < B |
| 1 | 1 | 0 | the operands differ in both directions; the order is **not resolved** |

The last row covers 52,670 of the 65,536 8-bit operand pairs. The variant is
useful as an equality detector, and as an ordering detector only when
differences all point one way. It is built as drawn. It is **not** a
general-purpose magnitude comparator. Use `ppc_comparator` for that.

## Module hierarchy and interfaces

```
comparator_top        a, b -> pp_res, pp_left_bus, pp_right_bus,
│                             rd_res, rd_left_bus, rd_right_bus
├── ppc_comparator    parallel-prefix comparator: a, b -> res, left_bus, right_bus
│   ├── ppc_resolution   sets 1-5
│   │   ├── ppc_set1_psi, ppc_set2_sigma2, ppc_set3_sigma3,
│   │   └── ppc_set4_omega, ppc_set5_mux
│   └── cmp_decision
└── rd_comparator     reduced 8-bit variant
    ├── rd_resolution
    └── cmp_decision
cmp_pkg               PART_W = 4, cmp_result_t, num_levels4()
```

`comparator_top` drives both comparators from the same operands so they can
be compared side by side. To use just one comparator, instantiate
`ppc_comparator` or `rd_comparator` directly.

### Parameters

| parameter | default | where | meaning |
|-----------|---------|-------|---------|
| `N` | 8 | all width-carrying modules | operand width; must be a non-zero multiple of 4 (other values stop elaboration with an error) |
| `P` | 2 | `ppc_set3_sigma3` | number of partitions, N/4 |

The default of 8 bits is the width at which both comparators were evaluated.
The published schematic of the prefix tree is drawn at 16 bits, which is
`N = 16` here. The testbenches also exercise N = 32, 64, 72 and 128.

## How far to trust it, and where it departs from the published design

The published design gives these parts directly: the bus encoding, the LR
decision table, the 4-bit partitioning, the NOR function of set 2, the
2-bit-wide multiplexers of set 5, and the growing fan-in of set 4. The
following are this implementation's choices:

- **Set-1 flag.** The flag is `A_k xor B_k`. Only the flag's meaning
  ("terminate here") is given.
- **Own flag in set 4.** Including the bit's own flag is required for
  correctness (see set 4 above). As a result, the flag of a partition's top
  bit drives five cells, one more than the maximum fan-out of four quoted
  for the design.
- **Wide-operand trees.** The published design only says that extra levels
  appear in set 3 when the fan-in would exceed four. The radix-4 arrangement
  in set 3, and the OR tree in the decision module for more than four groups,
  are this implementation's own.
- **A = B output.** It is the NOR of L and R. An overview drawing labels
  that gate as a 2-input NAND, which only fits if it acts on inverted L/R
  signals. The function follows the LR table.
- **Reduced variant.** Its per-bit cells are read from a schematic whose
  gate types are not labelled. `A_k & ~B_k` and `~A_k & B_k` is the only
  reading that fits a per-bit cell feeding the unchanged decision module.
- **Not modelled.** Transistor-level properties (area, power, delay at 0.18 µm,
  0.12 µm and 90 nm) are outside what RTL can express. Nothing here
  reproduces them.

Verification is exhaustive at the default width. All 65,536 operand pairs go
through both comparators, and the parallel-prefix result is compared with
`a > b`, `a < b` and `a == b`. Wider instances (N = 16, 32, 64, 128) are
checked with random operand pairs built to agree above a random bit, so that
the deciding bit lands in every partition and every set-3 level.

## Simulating

Each testbench is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. Run from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cmp_pkg.sv tb/tb_comparator_top.sv --top-module tb_comparator_top
./obj_dir/Vtb_comparator_top
```

Replace the testbench name to run any other. All of them run in seconds.

| testbench | covers |
|-----------|--------|
| `tb_comparator_top` | both comparators at N = 8, all operand pairs, plus the worked example. It counts each behaviour and fails if one never happened: A=B, A>B, A<B, decided in the top partition, decided in a lower partition, a lower partition silenced by set 3, lower bits silenced by set 4, and the reduced variant unresolved. |
| `tb_ppc_comparator` | N = 8 exhaustive; N = 32 and 128 random |
| `tb_ppc_resolution` | N = 8 exhaustive; N = 16 and 64 random |
| `tb_ppc_set1_psi` … `tb_ppc_set5_mux` | each cell set on its own. Set 3 is tested with 2, 4, 5, 16 and 21 partitions: one to three tree levels, including padded trees. |
| `tb_cmp_decision` | N = 8 exhaustive; N = 16 and 72 (OR tree) |
| `tb_rd_resolution`, `tb_rd_comparator` | reduced variant, exhaustive at N = 8 |

## Changing it

- **Width.** Set `N` on `comparator_top` or `ppc_comparator`. Any multiple of
  4 works, and set 3 and the decision tree adapt on their own.
- **Partition size.** The partition size of 4 is `cmp_pkg::PART_W`. The set-2
  NOR and the set-4 select cells are written for four bits, so changing
  `PART_W` also needs those two modules edited.
