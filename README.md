# Fault-tolerant sparse Kogge-Stone adder

A Kogge-Stone adder is the fastest common parallel-prefix adder: every carry
comes out of a logarithmic-depth tree. A defect anywhere in that adder gives a
wrong sum, and the adder cannot tell. This design keeps the speed of a
Kogge-Stone tree and adds on-line fault detection and correction for the part
of the adder that forms the sum bits. It uses few extra parts: two spare 4-bit
adders, a 2-bit counter, a voter and a 16-bit register.

The trick is a *sparse* carry tree. The tree computes only the carry into every
4-bit segment. Four identical 4-bit ripple-carry adders (RC0..RC3) then form
the sum bits of their segments from those carries. Because the four segment
adders are identical, one pair of spare adders can check all of them in turn.
Each clock cycle, one segment adder is recomputed by the two spares and the
three results are voted.

The repository also holds a plain 32-bit Kogge-Stone adder: the dense prefix
tree, with a carry for every bit. It stands beside the fault-tolerant adder in
the top level and shares no logic with it.

```
             a[15:0] b[15:0] cin
                  |
          +---------------+
          |    gp_gen     |  g = a&b, p = a^b
          +---------------+
                  |
          +---------------+
          | sparse_ks_tree|  carries c4, c8, c12, c16 (= cout)
          +---------------+
           |    |    |    |                      counter (test_sel)
        +----++----++----++----+                       |
        | RC3|| RC2|| RC1|| RC0|      operand mux <----+----> carry mux
        +----++----++----++----+          |    |                |
           \    |    |    /            +------+ +------+         |
            4:1 sum mux  <--test_sel   |TestRC| |TestRC| <-------+
                 |                     +------+ +------+
                 +-----------+------------+--------+
                             |  majority voter ("comparator")
                             v
                   voted segment, fault, test_mismatch
                             |
                 16-bit corrected-sum register, segment [test_sel]
```

## The rotating self-test

`test_sel` is a 2-bit counter that steps 0, 1, 2, 3, 0, ... once per clock.
Its value *k* names the segment under test, and it drives three multiplexers:

* the **operand multiplexer** sends `a[4k+3:4k]` and `b[4k+3:4k]` to both test RCs;
* the **carry multiplexer** sends the carry into segment *k* (from the sparse
  tree; `cin` for segment 0) to both test RCs;
* the **sum multiplexer** sends RC*k*'s 4-bit sum to the voter.

The voter (`majority_voter`) takes a bitwise 2-of-3 majority of RC*k* and the
two test RCs. If any one of the three is wrong, the vote is still the correct
segment sum. Two flags come out with the vote:

* `fault` is high when RC*k* disagrees with the vote, so the segment adder
  under test is faulty.
* `test_mismatch` is high when the two test RCs disagree, so one of the
  spares is faulty. The vote is still right then, as long as RC*k* is fine.

A stuck-at fault shows only for operands that need the stuck bit at the other
value. So `fault` pulses only when the operands expose the fault *and* the
faulty adder is under test.

## Two ways to use the vote

The vote is used in two ways. The mode input `stop_on_fault` chooses how the
counter behaves.

**Counter-stop mode (`stop_on_fault = 1`).** The combinational output `sum` is
the four RC outputs with the segment under test replaced by the vote. While
`fault` is high the counter holds, so a faulty RC that has been found stays
under test. From then on its segment of `sum` comes from the voter in every
cycle that exposes the fault. This corrects one faulty segment adder. Before
the counter first reaches that adder, the raw sum can be wrong. If a second
adder fails, only one of the two is covered.

**Register mode (`stop_on_fault = 0`).** The counter never stops. On every
rising edge, the voted segment is written into segment `test_sel` of the
16-bit register `corrected_sum`. After four edges with the same operands,
every segment of the register has been written with a voted value. The
register then holds the right sum even if several segment adders are faulty,
as long as no single vote sees two wrong copies. The correction costs no
extra cycles after a fault is found: the register is simply sampled after the
four-cycle pass.

Register-mode timing, with operands applied just after edge 0:

```
edge         0        1        2        3        4
test_sel       k        k+1      k+2      k+3      k
register          seg k    seg k+1  seg k+2  seg k+3  written
corrected_sum                                 valid after edge 4
```

The counter keeps its phase across operand changes, so a pass can start at
any segment. What matters is that four consecutive writes cover all four
segments. `sum` and `cout` are always combinational. `cout` comes straight
from the sparse tree, and the rotating test does not cover it.

## The sparse carry tree

`sparse_ks_tree` builds the carries with the usual (G, P) prefix operator,
`G = g_hi | p_hi & g_lo` and `P = p_hi & p_lo` (`ksa_pkg::gp_combine`). The
carry-in is folded into bit 0 (`g0' = g0 | p0 & cin`), so each group generate
from bit 0 up is a true carry. There are four levels for 16 bits:

| level | span | nodes computed at bits | result at bits 3, 7, 11, 15 |
|-------|------|------------------------|-----------------------------|
| 0     | 1    | 1, 3, 5, ..., 15       | pairs [i:i-1]               |
| 1     | 2    | 3, 7, 11, 15           | [3:0] [7:4] [11:8] [15:12]  |
| 2     | 4    | 7, 11, 15              | [7:0] [11:4] [15:8]         |
| 3     | 8    | 11, 15                 | [11:0] [15:0]               |

Levels 0 and 1 reduce each segment to one pair at its top bit. Levels 2 and 3
are a Kogge-Stone tree over the four segment tops. The outputs are
`c[k]`, the carry into segment *k*, with `c[0] = cin` and `c[4] = cout`. The
widths are parameters (`WIDTH`, `SEG`, with `SEG` a power of two), and the
same rule covers other sizes.

## The 32-bit Kogge-Stone adder

`kogge_stone_adder` is the dense tree. After `gp_gen`, five prefix levels with
spans 1, 2, 4, 8 and 16 follow. At each level, every bit *i* ≥ span merges
with bit *i − span*. After the last level, node *i* holds the carry into bit
*i+1*. Then `sum = p ^ c` and `c32 = c[32]`. The ports are `a`, `b`, `c0`,
`sum`, `c32`. It is purely combinational and has no fault tolerance.

## Modules

| file | role |
|------|------|
| `rtl/ksa_pkg.sv` | `gp_t` (generate/propagate pair) and the prefix operator |
| `rtl/gp_gen.sv` | bitwise generate and propagate |
| `rtl/sparse_ks_tree.sv` | segment carries of the fault-tolerant adder |
| `rtl/full_adder.sv`, `rtl/rca.sv` | 4-bit ripple-carry segment adder (RC0..RC3, test RCs) |
| `rtl/seg_mux.sv` | N:1 selector, used as operand, carry and sum multiplexer |
| `rtl/majority_voter.sv` | 2-of-3 vote, `fault` and `test_mismatch` |
| `rtl/test_counter.sv` | 2-bit counter with enable |
| `rtl/corrected_sum_reg.sv` | 16-bit register written one segment per cycle |
| `rtl/ft_sparse_ksa.sv` | the fault-tolerant adder |
| `rtl/kogge_stone_adder.sv` | 32-bit dense Kogge-Stone adder |
| `rtl/ksa_top.sv` | both adders side by side (`ft_*` and `ks_*` ports) |

Parameter defaults: `ft_sparse_ksa` has `WIDTH = 16` and `SEG = 4`.
`kogge_stone_adder` has `WIDTH = 32`. The reset `rst_n` is active-low and
asynchronous. It clears the counter and the register. The adders themselves
hold no state.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself after a watchdog
limit. To build and run one with Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/ksa_pkg.sv tb/tb_ksa_top.sv --top-module tb_ksa_top
./obj_dir/Vtb_ksa_top
```

`tb_ksa_top` runs the whole design at its default sizes, and it runs in well
under a second. It adds random operands through the fault-tolerant adder in
several phases:

* fault-free;
* with one segment adder stuck;
* with two segment adders stuck;
* with one test RC stuck;
* in counter-stop mode with a stuck adder.

In the same run it adds random and full-carry-chain operands through the
32-bit adder. It counts each mechanism (fault flagged, faulty raw sum repaired
in the register, two faulty adders repaired in one pass, test-RC mismatch,
carry-out, 32-bit carry chain, counter held) and fails if one never happens.
Faults are injected with `force` on the segment sums inside `ft_sparse_ksa`
(`rc_sum[k][bit]`, `t_sum[t][bit]`). Verilator applies a `force` on a signal
inside a module instantiated many times to every instance of that module, so
faults are not forced inside `full_adder`.

## How far to trust it, and where it is this design's own

Taken from the source design: the block structure and its connections. That
means generate/propagate, a sparse Kogge-Stone carry tree, four segment
ripple-carry adders, two test RCs fed through a 4:1 operand multiplexer and a
carry multiplexer, a 4:1 sum multiplexer, a comparator, a 2-bit counter and a
16-bit register loaded one segment per count. Also taken from it: the idea
that the counter stops on a fault, the 16-bit width of the fault-tolerant
adder and the 32-bit width of the plain Kogge-Stone adder.

This design's own choices:

* The node placement of the sparse tree.
* The comparator as a bitwise majority vote.
* The `fault` and `test_mismatch` outputs.
* Stopping the counter with a synchronous enable instead of gating its clock.
* The `stop_on_fault` mode input. The source describes both the counter-stop
  behaviour and the register scheme, but a counter that stops would never
  refresh the other register segments, so here the two are modes.
* The combinational `sum` output with the voted segment spliced in.
* The reset.
* The register's write enable, which is tied high.

Synthesis caution: the two test RCs are identical logic with identical
inputs. A synthesizer that merges equal logic folds them into one, so
`test_mismatch` becomes constant 0 and a faulty test RC is no longer outvoted.
Mark the `g_test_rc` instances keep / dont-touch in the implementation flow.
The same applies to any flow that deduplicates registers or gates.

Not covered by the fault tolerance: the generate/propagate stage, the sparse
tree, the carry-out, the multiplexers, the voter and the register. A fault
there is neither detected nor corrected. The 32-bit Kogge-Stone adder has no
fault tolerance at all. No power, delay or area figures come with this RTL.
