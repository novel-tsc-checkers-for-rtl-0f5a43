# Totally self-checking checkers for Bose and Bose-Lin codes

A self-checking circuit protects a functional block by encoding its outputs
in an error-detecting code and placing a *checker* on them. The checker must
flag every non-code word. It must also give itself away when it is faulty
itself, and it should do so with as few signals as possible. This RTL
implements a family of such checkers for two systematic unidirectional codes:

* **Bose BUED code** (burst unidirectional error detecting): with `r` check
  bits, the check symbol is `C = zeros(I) mod 2^r`, where `zeros(I)` is the
  number of 0 bits in the `k` information bits. It detects a unidirectional
  burst of up to `2^(r-1)` bits.
* **Bose-Lin t-UED codes** (up to `t` unidirectional errors): for `r = 2, 3`
  the check symbol is the same `zeros(I) mod 2^r` (t = 2, 3). For `r >= 4` it
  is `C = (zeros(I) mod 2^(r-1)) + 2^(r-2)`, which detects up to
  `2^(r-2) + r - 2` unidirectional errors (6 for `r = 4`).

The checkers never build a binary zero counter followed by a comparator.
Instead they use *threshold circuits*: gates whose output flips when the
number of zeros on their inputs reaches a threshold. One final threshold
gate, Module A, uses the check bits to set its own threshold. Its single
output then toggles with a clock for a code word and sticks at 0 or 1 for a
non-code word. In silicon these gates are single ratioed CMOS stages, which
is what makes the checkers small and fast. Here they are modelled by their
logic function, so that the checkers can be simulated, synthesized and
reused.

## Threshold circuits

`mzero_threshold` (parameters `N`, `M`) is the *m-zeroes threshold circuit*.
Its output `out` is 0 when at least `M` of its `N` inputs are 0, and 1
otherwise.

`agg_zero_threshold` (parameters `N`, `Z`, `VW`, `V`) is the *aggregate-zeroes
threshold circuit*. Each control input `y[j]` adds the weight `V[j]` to the
threshold, and

    out = 0  when  zeros(x) >= sum_j y[j] * V[j],   else 1.

In the transistor circuit these two blocks stand for, every input at 0 turns
on one equal pMOS pull-up. The threshold is an nMOS pull-down that is as
strong as `M` pull-ups, or as strong as `V[j]` pull-ups for each `y[j]`. An
inverter restores the level. The RTL keeps the function but not the
structure: it counts the zeros and compares the count with an integer.

## Module A: why one gate can check the whole word

`module_a` (parameters `K`, `R`) is an aggregate-zeroes threshold circuit with
`K + 1` counted inputs and these weighted inputs:

| counted inputs `x` | weighted inputs `y`        | weight       |
|--------------------|----------------------------|--------------|
| `I_1 .. I_k`       | `O_1 .. O_l`               | `2^r` each   |
| `clk`              | `C_j` (`j = r-1 .. 0`)     | `2^j`        |
|                    | constant 1                 | 1            |

Here `l = floor(k / 2^r)`. Output `O_m` comes from an m*2^r-zeroes threshold
circuit `M_m` followed by an inverter, so `O_m = 1` when
`zeros(I) >= m*2^r`. The `O` bits therefore form a thermometer code of
`floor(zeros(I) / 2^r)`, and the weighted threshold of Module A is

    AW = 2^r * floor(zeros(I)/2^r) + C + 1
       = zeros(I) - (zeros(I) mod 2^r) + C + 1.

Write `C = (zeros(I) mod 2^r) + a`, where `a` is the check symbol error. Then
`AW = zeros(I) + a + 1`. Module A compares this with
`zeros(I) + (clk == 0 ? 1 : 0)`:

| case                       | `clk = 0` | `clk = 1` |
|----------------------------|-----------|-----------|
| code word (`a = 0`)        | 0         | 1         |
| check symbol too large (`a > 0`) | 1   | 1         |
| check symbol too small (`a < 0`) | 0   | 0         |

A code word is the only case that makes the output follow the clock. Every
non-code word freezes it. The check needs no adder, no comparator and no
decoder, only `l + 1` threshold gates.

## Single output checker

`bose_checker_single` (`K`, `R`; default 8, 2) is the threshold circuits
`M_1..M_l`, their inverters and one Module A. The system clock goes to Module
A's `clk` input as a data signal. Over one clock period the output of a
healthy checker reads `(0, 1)` (low half, high half) for a code word. A
non-code word or a fault in the checker gives `(0, 0)` or `(1, 1)`. The
checker thus turns the usual pair of complementary wires into one wire that
carries the pair in time. It also checks the Bose-Lin codes with `r = 2, 3`.

`det_sampler` reads that wire. It is a double-edge-triggered flip-flop
clocked by `clk_dly`, a copy of the system clock delayed by more than the
checker delay plus the setup time. The rising edge stores the high-half
value in `s_hi`. The falling edge stores the low-half value in `s_lo`. `q` is
the usual double-edge output: the flop written last. Because each half of the
period must cover the checker delay and the setup time, the clock period must
exceed `2 * (t_d + t_s)`. The block is written as one flop per edge and a
multiplexer. That is one common form; the source does not specify the
circuit.

## Double output checker and its T flip-flop

`bose_checker_double` (`K`, `R`; default 8, 2) shares `M_1..M_l` between two
Module A copies. `A_2` sees `clk` and gives `out2`. `A_1` sees the inverted
`clk` and gives `out1`. A code word gives `(out1, out2) = (1, 0)` while
`clk = 0` and `(0, 1)` while `clk = 1`. A non-code word gives `(0, 0)` or
`(1, 1)`. The `clk` input should run at half the rate at which words arrive,
so that successive words exercise both code values of the pair.
`tff_divider` makes that signal from the system clock. It is a T flip-flop
with the T input tied high, plus an asynchronous reset to 0. The reset is an
addition of this design.

## Bose-Lin checker for r >= 4

For `r >= 4` the check symbol `D + 2^(r-2)`, with `D = zeros(I) mod 2^(r-1)`,
splits into `C_{r-1} = D_{r-2}`, `C_{r-2} = NOT D_{r-2}` and
`C_{r-3..0} = D_{r-3..0}`. `boselin_checker` (default `K = 64`, `R = 4`)
therefore needs no new arithmetic:

* a `bose_checker_double` for `r - 1` check bits receives
  `D = {C_{r-1}, C_{r-3}, ..., C_0}`;
* `two_rail_checker` merges that checker's output pair with the pair
  `(C_{r-1}, C_{r-2})`, which must be complementary.

The output pair `z` is complementary for a code word and `00` or `11`
otherwise, in both `clk` phases. The two-rail cell is the standard AND-OR one
(`z1 = a1 b1 + a0 b0`, `z0 = a1 b0 + a0 b1`). The source names a two-rail
checker without giving its circuit.

## Top level

`tsc_checkers_top` places the three checkers side by side. Each has its own
input word:

| prefix | checker                          | parameters (default)       |
|--------|----------------------------------|----------------------------|
| `bs_`  | single output Bose + `det_sampler` | `BOSE_K` (8), `BOSE_R` (2) |
| `bd_`  | double output Bose               | `BOSE_K`, `BOSE_R`         |
| `bl_`  | double output Bose-Lin           | `BL_K` (64), `BL_R` (4)    |

Inputs are `sys_clk`, `sys_clk_dly` and `rst_n`. One `tff_divider` on
`sys_clk` drives both double output checkers, and its output is brought out
as `half_clk`. All checkers are combinational. Words for the single output
checker must be held for a full `sys_clk` period. Words for the double output
checkers may change every cycle.

Input numbering throughout: `i[j]` is `I_{j+1}`, `c[j]` is `C_j`. Where the
check bits sit inside a stored Bose code word does not matter to the checker,
since it takes information and check bits on separate ports.

## What the model does and does not capture

* **Logic, not transistors.** The threshold gates of the source are ratioed
  CMOS stages with sizing rules, and the source argues their
  totally-self-checking behaviour transistor by transistor. That argument
  covers stuck-at, stuck-open and stuck-on transistors and resistive
  bridges, and depends on the layout (input lines kept far apart). None of
  this carries over to a synthesized netlist. This RTL reproduces the
  checkers' *function*: which words are accepted, how the outputs are
  encoded in time and in pairs, and the clocking. A checker synthesized from
  it into standard cells computes the same function, but it is not
  guaranteed to be self-testing for its own internal faults.
* **Choices of this design** where the source gives no detail: the weight
  width of `agg_zero_threshold`, the reset of the T flip-flop, the circuit of
  the double-edge flip-flop and its `s_hi`/`s_lo` outputs, the two-rail cell,
  the shared T flip-flop in the top, and the port and bit order.
* **Sizes.** Defaults are the example sizes of the source: an 8-bit checker
  with `r = 2`, and `(k, r) = (64, 4)` for the Bose-Lin checker. All checkers
  are parameterized. The testbenches also run `(16,2)`, `(16,3)`, `(32,2)`,
  `(32,3)` and `(64,4)` for the Bose checkers, and `(8,4)`, `(16,4)`, `(32,5)`
  and `(64,6)` for the Bose-Lin checker. `K` must be at least `2^R` (Bose) or
  `2^(R-1)` (Bose-Lin); this is checked at elaboration.

## Simulating

Every block has a self-checking testbench `tb/tb_<module>.sv` that ends by
printing `TB_RESULT checks=N failures=M`. The Bose and Bose-Lin testbenches
drive several sizes through the harness modules `tb/*_harness.sv`. The
references are zero counts and check symbols computed in the testbench.

* `tb_mzero_threshold`, `tb_agg_zero_threshold` and `tb_module_a` try every
  input combination at `k = 8`, plus random words for a 32-input threshold.
* `tb_bose_checker_single` and `tb_bose_checker_double` try the 8-bit
  checkers on every information word, check symbol and clock level. They
  then try random code and non-code words at the sizes listed above.
* `tb_boselin_checker` applies code words, wrong check symbols, broken
  `(C_{r-1}, C_{r-2})` pairs and unidirectional errors of up to
  `2^(r-2)+r-2` bits. Each such error must give a non-code word that the
  checker flags.
* `tb_bose_test_set` builds the self-test set of the single and double
  output checkers for `(8,2)`, `(32,2)`, `(32,3)` and `(64,4)`. For each threshold `m` it
  uses words with `m*2^r - 1` zeros whose ones cover every bit position, and
  words with `m*2^r` zeros whose zeros cover every position. Words are
  applied in both crossing orders. The fault-free checker must accept every
  word. Then each single stuck-at fault on the threshold lines `O_m`, on the
  outputs and (double output) on the inverted clock is forced in turn, and
  the set must detect it. The sets have
  15, 86, 53 and 85 words; every one of these faults is detected.
* `tb_tsc_checkers_top` runs the whole top at default sizes for 3000 clock
  cycles, with a real delayed clock. It checks the sampled single-output
  pairs, the double-output pairs against `half_clk`, the Bose-Lin output and
  the T flip-flop. It also counts that every case happened.

With Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps \
      -Irtl -Itb -y rtl -y tb +libext+.sv \
      --top-module tb_tsc_checkers_top tb/tb_tsc_checkers_top.sv
    ./obj_dir/Vtb_tsc_checkers_top

Each testbench finishes in a few seconds. To change a checker's size, set
`K` and `R` on the checker, or `BOSE_K`/`BOSE_R`/`BL_K`/`BL_R` on the top.
