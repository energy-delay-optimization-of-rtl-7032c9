# 64-bit Ling sparse-2 radix-4 domino adder, with its at-speed test chip

A 64-bit adder that finishes in one cycle has to make its carries fast. This
design does it with three ideas:

* **Ling pseudo-carries.** The carry tree computes H (the pseudo-carry) instead
  of the usual group generate G. Each term of H has one fewer factor, so the
  first gates have shorter transistor stacks. The missing factor is added back
  in the sum logic, which is off the critical path.
* **A radix-4 Kogge-Stone tree**, which merges four groups per stage with a
  lateral fanout of 1. Three stages (H4, H16, H64) cover 64 bits.
* **Sparseness 2.** Carries are built at every second bit only: 32 nodes
  instead of 64. Each carry then selects two precomputed sums.

The carry stages are domino gates. Each stage runs on its own phase clock
(pc1 to pc4, then psel for the sum-select mux). The precharge of each stage is
delayed so that it is hidden from the cycle. On the original test chip this
adder ran in 240 ps at 1 V in 90 nm CMOS.

This RTL implements the logic of that adder. It also gives a
tick-level model of its domino timing, and the test circuitry around it:
scan chains, an operand mux, an output flip-flop, a comparator, a phase-clock
generator, and eight cores on one chip. It is based on the article
*Energy–Delay Optimization of 64-Bit Carry-Lookahead Adders With a 240 ps
90 nm CMOS Design Example*. Where that
article is silent, the choices made here are marked as such below.

## The arithmetic

Notation: `g_i = a_i b_i`, `p_i = a_i + b_i`, `t_i = a_i ^ b_i`. `G_i` is the
carry out of bit i, so the carry into bit i is `G_{i-1}`, and `G_{-1} = cin`.
The Ling pseudo-carry is

    H_i = g_i + G_{i-1}          so that        G_i = p_i H_i

Because `g p = g`, the 4-bit group pseudo-carry loses one factor in every term
compared with G. For example, `H_3 = g3 + g2 + p2 g1 + p2 p1 g0`, while
`G_3 = g3 + p3 g2 + p3 p2 g1 + p3 p2 p1 g0`.

**Carry-in.** The carry-in is folded into the generate of bit 0:
`g_0 = a0 b0 + (a0 + b0) cin`, which is the carry out of bit 0. This keeps
`p_0 g_0 = g_0`, so the reduced equations stay valid. The carry-in also
selects sums 0 and 1 directly. (This design's choice. The original only says
that carry-in and carry-out exist.)

**Which bits get a carry.** Pseudo-carries exist at the odd bits 1, 3, ...,
63. `H_j` selects the two sums above it, and `H_63` yields the carry-out:

| sum bit i                 | selected by          | S0 (select = 0)     | S1 (select = 1)                        |
|---------------------------|----------------------|---------------------|----------------------------------------|
| 0                         | cin                  | `t0`                | `~t0`                                  |
| 1                         | cin                  | `t1 ^ g0`           | `t1 ^ p0`                              |
| even i >= 2               | `H_{i-1}`            | `t_i`               | `t_i ^ p_{i-1}`                        |
| odd i >= 3                | `H_{i-2}`            | `t_i ^ g_{i-1}`     | `t_i ^ (g_{i-1} + p_{i-1} p_{i-2})`    |
| 64 (cout)                 | `H_63`               | `0`                 | `p_63`                                 |

In this table g and p are the plain `a&b` and `a|b`. The odd rows unroll the
carry recursion once:
`G_{i-1} = g_{i-1} + p_{i-1} p_{i-2} H_{i-2}`.

So the select index for result bit i is simply `i/2`: index 0 is cin and
index k+1 is `H_{2k+1}`.

The original describes the parity of the carried bits in two ways that do not
agree. This RTL follows the version in which even sums use the simple form
and odd sums use the unrolled form. That is also the version that puts a
carry node at bit 63 for the carry-out. Either parity gives a correct adder.
What differs is only which bit slices hold the more complex sum gates.

## The carry tree

All three stages are combinational modules. Nodes below bit 0 count as
`H = I = 0`.

| stage      | module      | at bit i = 2k+1, from                                  | equations                                                           |
|------------|-------------|--------------------------------------------------------|---------------------------------------------------------------------|
| PG (G/T)   | `ling_pg`   | a, b, cin                                              | `g = a&b` (bit 0 with cin), `p = a|b`                               |
| H4 / I4    | `ling_h4`   | bits i..i-3                                            | `H4 = g_i + g_{i-1} + p_{i-1} g_{i-2} + p_{i-1} p_{i-2} g_{i-3}`, `I4 = p_{i-1} p_{i-2} p_{i-3} p_{i-4}` |
| H16 / I16  | `ling_h16`  | H4/I4 nodes k, k-2, k-4, k-6 (4 bits apart)            | `H = H_k + I_k (H_{k-2} + I_{k-2} (H_{k-4} + I_{k-4} H_{k-6}))`, `I = product of the four` |
| H64        | `ling_h64`  | H16/I16 nodes k, k-8, k-16, k-24 (16 bits apart)       | same merge. Every group now reaches bit 0, so no I is needed.        |

`I` is the Ling *transmit* term of a group, the product of the propagates
shifted down by one bit. It is what lets a higher group's H absorb a lower
one. The published design names the I terms but does not print their
equations, so the ones above are this design's reading.

## Domino timing model

The gates of the real adder are domino gates. Precharge drives the output
low. Evaluation can only raise the output, and a keeper holds it high once it
has risen. `domino_node` models a bank of such gates on a fast *tick* clock,
one tick per stage:

    eval = 0 :  q <= 0            (precharge)
    eval = 1 :  q <= q | f        (evaluate; once high, stays high)

Which stages are footed and which are footless follows the original.
PG (pc1) and the sum-select mux (psel) are footed. H4 (pc2), H16 (pc3) and
H64 (pc4) are footless. A footless gate has no clocked foot transistor. If it
precharges while its pull-down conducts (`!eval && f`), the precharge device
fights the pull-down. The model flags that case as `contention`.

The sum-select mux is given both rails of the carry: H64 and its dynamic node
H64'. H64' is high during precharge and only falls once H64 has evaluated. If
psel rises before that, both rails are high and S0 is wrongly discharged into
the result. This is why psel must be a hard clock edge that comes late.

With the default edges below, one adder cycle is 16 ticks (`ling_pkg::TICKS`):

| phase | high (evaluate) on ticks | precharge |
|-------|--------------------------|-----------|
| pc1   | 0 .. 12                  | 13 .. 15  |
| pc2   | 1 .. 13                  | 14, 15, 0 |
| pc3   | 2 .. 14                  | 15, 0, 1  |
| pc4   | 3 .. 15, 0               | 1, 2      |
| psel  | 4 .. 15, 0               | 1, 2, 3   |

What happens in one cycle:

* The operands change at tick 0.
* PG evaluates at tick 0, H4 at tick 1, H16 at tick 2 and H64 at tick 3.
* The sum is valid from tick 5 and held until psel precharges after tick 0 of
  the next cycle.
* The output flip-flop captures the sum on the rising edge of pc1 (tick 0).

Each footless stage enters evaluation before its first input can rise. It
precharges only after its input stage has already precharged. Later stages
evaluate across the cycle boundary. That is the delayed precharge.

These tick positions were chosen for this model. They are not measured
values: on silicon the edges sit at picosecond offsets inside a 240 ps
cycle, and the tick grid keeps only their order. No delays, transistor
sizes, keeper strengths or clock drivers are modelled.

## Test chip

`ling_test_chip` holds `NUM_CORES = 8` cores, as on the original die. All
cores share one phase-clock generator. Each core sits in an
`adder_test_slice`:

    scan chain (vec0, vec1) -> operand_mux -> ling_adder64 -> out_ff (pc1) -> sum_comparator
                                                                          ^
    scan chain (exp0, exp1) ----------------------------------------------+

* **clock_gen.** A 16-tick counter. Each phase is high from its `rise` tick up
  to, but not including, its `fall` tick. A window wraps around the cycle
  boundary when `fall <= rise`. The edges (`clk_cfg_t`, 40 bits) sit in the
  scan chain, so any edge can be moved by whole ticks. On reset they load the
  defaults above.
* **operand_mux.** While `run` is high, it alternates between the two scanned
  vectors every cycle. The core therefore sees a new input transition in
  every cycle. While `run` is low, it holds vector 0.
* **out_ff.** Captures `{cout, sum}` on the rising edge of pc1. It also
  captures which vector produced the result, and whether that cycle was clean
  (`run` high and no scanning during the whole cycle).
* **sum_comparator.** One tick after each capture, it compares the result
  with the scanned expected value for that vector. `out` pulses once for each
  wrong result, and `fail` stays set until reset.
* **contention** (per core, sticky). A footless stage precharged against a
  conducting pull-down while the core was running.
* The original places a buffer between the flip-flop and the comparator. It
  has no logic function and is a wire here. The pads are not modelled.

**Scan chain layout.** The chain runs from `scan_in` through the clock
settings, then through core 0, core 1, and so on, to `scan_out`. Every segment
shifts toward its bit 0.

Think of the chain as one register, with the first segment at the top. Its
image is then

    { clk_cfg_t (40) , core0 , core1 , ... , core7 }      core = { vec1, vec0, exp1, exp0 }

Here `vec = {a[63:0], b[63:0], cin}` (129 bits) and `exp = {cout, sum[63:0]}`
(65 bits). That is 388 bits per core and 3144 bits for the chip. To load the
chain, shift the image in LSB first, one bit per tick with `scan_en` high.
Then raise `run`.

The ports are plain signals: `clk` (tick), `rst_n`, `scan_en`, `scan_in`,
`scan_out`, `run`, `out[7:0]`, `fail[7:0]` and `contention[7:0]`.
For observation there are also `phases`, `tick` (the position in the cycle)
and `results[7:0]` (each core's last captured `{cout, sum}`).

## Files

| file | contents |
|------|----------|
| `rtl/ling_pkg.sv` | widths, `operand_t`, `phases_t`, `clk_cfg_t`, default edges, scan widths |
| `rtl/ling_pg.sv`, `ling_h4.sv`, `ling_h16.sv`, `ling_h64.sv` | carry-tree stages (combinational) |
| `rtl/ling_sum_precompute.sv`, `ling_sum_select.sv` | conditional sums and the dual-rail select |
| `rtl/domino_node.sv` | tick model of a domino gate bank (footed / footless) |
| `rtl/ling_adder64.sv` | the adder core: the stages plus their domino timing |
| `rtl/clock_gen.sv`, `scan_chain.sv`, `operand_mux.sv`, `out_ff.sv`, `sum_comparator.sv` | test circuitry |
| `rtl/adder_test_slice.sv` | one core with its test circuitry |
| `rtl/ling_test_chip.sv` | the eight-core chip (top) |
| `tb/tb_*.sv` | one self-checking testbench per module; `tb_ling_ref_pkg.sv` holds ripple-carry and group-term reference models |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. Each also
has a watchdog. For example, the full chip at its default size:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
        rtl/ling_pkg.sv tb/tb_ling_ref_pkg.sv rtl/*.sv tb/tb_ling_test_chip.sv \
        --top-module tb_ling_test_chip -o sim
    ./obj_dir/sim

That build takes about 15 s, and the run takes well under a second. For a
unit, replace the testbench and the top module, for example `tb_ling_h64`.

What the testbenches establish:

* **Logic.** The carry-tree stages are checked node by node against group
  terms computed by loops, on thousands of random and corner inputs. The sum
  precompute block is checked by selecting its outputs with reference
  pseudo-carries and comparing the result with `a + b + cin`.
* **Core timing.** `tb_ling_adder64` checks that the output is still
  precharged at tick 4 and correct from tick 5 to tick 15 (latency 5 ticks).
  It then checks two mistimings. Moving psel one tick early corrupts sums.
  Precharging pc2 while PG is still evaluating raises `contention`.
* **Chip.** `tb_ling_test_chip` runs the whole chain: scan load, clean
  at-speed runs of all eight cores (including carry-in and carry-out
  vectors), a planted wrong expected value in one core only, an early psel
  set through the scan chain, and an early pc2 precharge. It counts how often
  each of these happened.
* **Timing sweep.** `tb_psel_sweep` is the model's version of an at-speed
  delay measurement. It moves the psel rise through the scan chain, from tick
  1 to tick 15, while all cores add worst-case vectors. In those vectors a
  carry ripples from the carry-in or from bit 0 all the way to the
  carry-out. The sweep finds tick 4 as the earliest edge that works. That is
  one tick after H64 evaluates.

## Changing it

* The operand width (64) and the tree shape are fixed in `ling_pkg` and in the
  stage index arithmetic. Sparseness, radix and width are not parameters.
* `NUM_CORES` on `ling_test_chip` sets the number of cores. Each core adds 388
  scan bits.
* The default clock edges are `CLK_CFG_DEFAULT` in `ling_pkg`. At run time,
  change them through the scan chain. The cycle can be at most 16 ticks,
  because the edge fields are 4 bits (`TICK_W`).

## How far to trust it

* **Follows the original:** the equations; the radix-4, sparse-2 Kogge-Stone
  structure; the stage split and the names of the phases; which stages are
  footed and which footless; the dual-rail H64/H64' select with a late psel;
  the test path (scan, MUX, Out FF on pc1, comparator against precomputed
  sums); eight cores with one clock generator.
* **This design's own choices:**
  * how the carry-in enters;
  * the parity of the carried bits;
  * the I-term equations of H16 and H64;
  * the tick-level timing model and its default edges;
  * the alternating operand mux;
  * the scan order and widths;
  * result tagging in the comparator;
  * contention being recorded only while running.
* **Not represented:** anything electrical. That includes the 240 ps delay,
  power, gate sizing, keeper strength, stack-node precharging, the clock drivers, and
  the layout in which the complex odd-bit sum gates fill the slices the sparse
  tree leaves empty.
