# Digit-serial multipliers with one row per clock phase

A digit-serial multiplier takes a W-bit operand N bits at a time (one *digit*
per clock cycle). That makes it smaller than a parallel array and faster than
a bit-serial design. The idea here is to give each bit of the digit its own
row of logic and its own clock phase. A digit cycle is split into N
overlapping phases, CLK1..CLKN. Row k adds `b(k)·A` to a running carry-save
sum during phase k and emits one finished product bit. After N phases a whole
N-bit product digit is done, and the last row's carry-save state goes back to
the first row for the next digit.

In a circuit implementation each row is a block of domino logic clocked by
its own phase. Overlapping phases let one row borrow time from the next, so
no latches are needed between rows. This RTL keeps that organisation, with one
row per phase and one digit per cycle. It models each phase as a clocked step
(see *What the RTL models*).

Two multipliers are provided, both 16 × 16 bits with 4-bit digits and four
phases by default:

* `ds_mult_unsigned`: the unsigned multiplier.
* `ds_mult_signed`: the two's complement multiplier. Its last row (Block-B)
  can add the precomputed `-A` instead of `A`.

`ds_mult_top` puts both side by side behind one phase generator and one
sequencer. It takes A in parallel and B as digits, least significant first.
It returns both 32-bit products as 8 digits, least significant first.

## How one product is computed

Each row is a `block_a`: W `cell_a` cells, each an AND gate (`A(j)·b(k)`)
feeding a full adder with the sum-in `Si(j)` and carry-in `Ci(j)` from the
row above. The row produces a sum vector `So` and a carry vector `Co`:

* `So(0)` has the lowest weight the row will ever touch. It is a finished
  product bit.
* `So(W-1:1)`, shifted down one place, becomes the next row's sum-in (`ts`).
* `Co(W-1:0)`, unshifted, becomes the next row's carry-in (`tc`). The carry
  already sits one weight higher, which is the same place in the next row.

No carry is propagated inside a row, so a row's delay is one full adder. For
the unsigned multiplier the top cell's sum-in is 0. `ts` is then W-1 bits wide
and `tc` is W bits.

The schedule for W = 16, N = 4 (C = 2W/N = 8 digit cycles):

| digit cycle | b input                | first-row state                 | product digit out |
|-------------|------------------------|---------------------------------|-------------------|
| 0           | B[3:0]                 | zeros (Con = 1, through the MUX)| P[3:0]            |
| 1 .. 3      | B[7:4] .. B[15:12]     | `tc`/`ts` of row 4, fed back    | P[7:4] .. P[15:12]|
| 4 .. 7      | 0000 (inserted)        | fed back                        | P[19:16] .. P[31:28] |

In each cycle the rows emit product bits in phases 1..N. Bit k would be lost
when its row precharges, so domino buffers carry it through the later phases.
Bit 0 passes through N-1 buffers, bit 1 through N-2, and so on (6 buffers for
N = 4). The whole digit is then present in the last phase.

Why the zero digits give the exact high half: let `V` be the value of the
carry-save state. Each row computes `V + b·A = p + 2·V'`, where `p` is the
output bit and `V'` is the new state. No information is lost. After the W
data bits, `V` equals the upper half of the product, and W rows with `b = 0`
shift it out bit by bit. `tb_block_a` checks this per-row identity.

## Signed multiplication and Block-B

For two's complement operands,

    P = -A·b(W-1)·2^(W-1) + Σ_{i<W-1} A·b(i)·2^i

so the multiplier's sign bit contributes `-A`. The signed design makes two
changes:

* **Sign extension in every row.** A, the sum state and the carry state are
  all read as sign-extended numbers, and both state vectors are W bits wide.
  A cell above position W-1 would see the same three inputs as cell W-1. So
  the extra sum bit `So(W)` is a copy of `So(W-1)`, and the carry vector
  extends from `Co(W-1)`. The per-row identity then holds exactly in two's
  complement.
* **Block-B as the last row.** The sign bit `b(W-1)` is bit N-1 of the last
  data digit, so it always lands in the last row. That row is a `block_b`:
  * Multiplexers choose, bit by bit, between A and the precomputed `-A` under
    `Con2`.
  * `-A` is W+1 bits wide, because `-(-2^(W-1)) = 2^(W-1)` does not fit in W
    bits.
  * An extra sign cell adds `-A(W)` to the sign-extended sum and carry.
    Another multiplexer, also under `Con2`, takes its sum as the top bit of
    the new sum state.
  * The sign cell's carry-out is dropped. In this row it weighs 2^(W+1),
    which is 2^(2W) or more in the final product, so it cannot reach any of
    the 2W product bits.

  With `Con2 = 0`, Block-B computes exactly what Block-A computes.

The sequencer raises `Con2` only in digit cycle W/N-1. In the zero-digit
cycles b is 0 and Block-B adds nothing. `-A` is computed once when a product
starts and held with A.

## Clock phases

`phase_gen` derives the phases from a clock that runs N times the digit rate.
A step counter runs from 0 to N-1. Phase k is high during steps k .. k+N/2-1,
which gives:

* a 50% duty cycle;
* a lag of 1/N cycle behind the previous phase;
* an overlap of N/2 - 1 steps with its neighbour.

For N = 4 this is the usual four-phase overlapping scheme. For N = 2 the two
phases are complementary and do not overlap. N must be even.

`phase_gen` also produces:

* `eval`, a one-hot marker of the current step;
* `cyc_last`, which marks the last step of a digit cycle.

## What the RTL models, and where it departs from a domino implementation

In the circuit, the rows are dual-rail domino gates with no latches. A row can
keep evaluating past the end of its nominal phase (time borrowing), and clock
skew is absorbed by the phase overlap. None of this can be written as
synthesizable two-state logic. In the RTL, each row's outputs are registered
at the end of its phase step (`eval[k]`), and the domino buffers are
registers enabled in their phase. The consequences:

* **The schedule is the same.** The bit-per-phase and digit-per-cycle rate,
  the order of the rows, the feedback and the buffer placement all match the
  circuit.
* **The cycle time is not.** The per-phase delays and the timing advantage of
  the domino style are not represented; the timing model below covers
  them. In the RTL, one digit cycle is N clocks of `clk`.
* **The output appears one digit cycle later.** The digit made in cycle c
  appears on the outputs at the start of cycle c+1 and holds for one digit
  cycle. A product is complete 2W/N digit cycles after it starts (8 for the
  defaults), and the testbenches check this count.
* **Everything has a reset.** All state has an asynchronous active-low reset.
  Correct results do not depend on it, because the first cycle of each product
  loads zeros.

The following are this design's own choices:

* the handshake;
* the sequencer that makes `Con`, `Con2` and the zero digits;
* computing `-A` inside the unit;
* allowing products to follow back to back.

The unsigned and signed multipliers share their operands in `ds_mult_top`.
Pick the product you need.

## Timing model of the domino implementation

`ds_mult_domino_model`, in `tb/`, is a simulation-only model of the
four-phase domino circuit. It reuses the `block_a`/`block_b` rows and adds real-time behaviour.

**How it works.**

* Every bus is dual-rail. It is either precharged (no value) or carries a
  value.
* Row k precharges while its phase is low.
* While its phase is high, a row fires once its inputs carry a value, and its
  result appears `ROW_DELAY_PS[k]` later. The result then holds until the
  phase falls.
* The domino buffers behave the same way, one per phase.

**What counts as an error.** A phase that falls before its row has finished,
or a phase that passes without the row's inputs ever arriving, is counted as
a timing error.

**Time borrowing.** A row may finish after the end of its nominal 1/N slot,
and the model reports by how much. The row that follows simply starts later
inside its own, overlapping phase.

**Default delays.** The defaults are the per-row delays of the unsigned
four-phase circuit: 0.70, 0.40, 0.29 and 0.21 ns at a 1.6 ns cycle. For the
signed circuit they are 0.90, 0.37, 0.31 and 0.42 ns at 2.0 ns.

**What `tb_ds_mult_domino_model` checks.** With those numbers, the
testbench checks that:

* the products are correct;
* each digit is complete within its own cycle;
* there are no timing errors;
* the rows borrow 0.30/0.30/0.19/0 ns (unsigned) and 0.40/0.27/0.08/0 ns
  (signed).

At a 1.2 ns cycle, the first row (0.7 ns) cannot finish inside its 0.6 ns
phase, and the model must report errors.

**Limits.** The following are not modelled: the buffer delay (assumed
0.1 ns), clock skew, and the hold time that a row's first gate needs on its
inputs. The model is not part of `ds_mult_top`.

## Interface of `ds_mult_top`

Parameters: `W` (word size, default 16) and `N` (digit size and number of
phases, default 4). W must be a multiple of N, and N must be even.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | phase-step clock (N per digit cycle); asynchronous active-low reset |
| `start` / `ready` | in / out | 1 | a product starts at a clock where both are high; `ready` is high only in the last step of a digit cycle, when idle or in the last cycle of the running product |
| `a` | in | W | multiplicand, taken with `start` |
| `b_digit` | in | N | B digit 0 with `start`, then digits 1..W/N-1 at clocks where `b_take` is high |
| `b_take` | out | 1 | `b_digit` is taken at this clock |
| `busy` | out | 1 | a product is in progress |
| `p_u_digit`, `p_s_digit` | out | N | unsigned and signed product digits, LSD first |
| `out_valid`, `out_first`, `out_last` | out | 1 | tags of the current output digit; they change with it |
| `cyc_last` | out | 1 | last step of a digit cycle; read the output digit when it is high |
| `clk_ph` | out | N | the phase clocks, for reference |

Products may follow each other without a gap: starting a new product in the
last cycle of the previous one gives one 2W-bit product every 2W/N digit
cycles.

## Modules

| file | role |
|------|------|
| `dsm_pkg.sv` | default word and digit size |
| `cell_a.sv` | AND gate + full adder |
| `block_a.sv` | one carry-save row; `SIGNED` selects the unsigned or sign-extending form |
| `block_b.sv` | last signed row: A / -A selection, sign cell |
| `init_mux.sv` | zero-or-feedback selection at the first row |
| `domino_buf.sv` | phase-enabled hold element for early product bits |
| `ds_mult_unsigned.sv`, `ds_mult_signed.sv` | the two multipliers: N rows, MUXes, feedback, buffer triangle |
| `phase_gen.sv` | N overlapping phases, one-hot step |
| `ds_control.sv` | Con / Con2 / zero digits, -A, handshake |
| `ds_mult_top.sv` | everything together |

These are the synthesizable files, in `rtl/`. The domino timing model,
`ds_mult_domino_model.sv`, is in `tb/` with the testbenches.

## Simulation

Every testbench in `tb/` checks its results itself and ends with a line
`TB_RESULT checks=<n> failures=<n>`. To build and run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/dsm_pkg.sv tb/tb_ds_mult_top.sv --top-module tb_ds_mult_top
    ./obj_dir/Vtb_ds_mult_top

Add `--timescale 1ns/1ps` for the timing-model testbench.

What the testbenches cover:

* **`tb_ds_mult_top`** runs the unit at its default size.
  * It runs 300 products with random and extreme operands, some back to back
    and some after idle gaps.
  * It compares both products with products computed in the testbench.
  * It checks the 8-digit-cycle latency and that each digit is held for a
    full cycle.
  * It fails if any of these never happened: the zero load, Block-B using
    -A, -A of -32768, zero-digit insertion, a back-to-back start, a start
    from idle.
* **`tb_digit_sizes`** runs the same checks with digit sizes 2, 4 and 8
  side by side, using `tb_top_agent`.
* **`tb_ds_mult_unsigned` and `tb_ds_mult_signed`** drive the phases
  directly.
* **`tb_block_a` and `tb_block_b`** check the per-row value identity on
  random states.
* **`tb_ds_control`** checks the control schedule against a model.
* **`tb_phase_gen`** checks the phase waveforms for N = 2, 4 and 8.
* **`tb_cell_a`, `tb_init_mux` and `tb_domino_buf`** check the small
  elements.
* **`tb_ds_mult_domino_model`** exercises the timing model, using
  `tb_domino_agent`.

## Digit size and throughput

One digit is finished per digit cycle, so the throughput is N bits per digit
cycle. The same 16-bit products take 16, 8 or 4 digit cycles for N = 2, 4 or
8. A larger N gives fewer, longer cycles. The cycle grows with the N
full-adder rows in series plus the first-row MUX. The choice of N therefore
trades area (N rows of W cells) against speed. In a domino implementation,
time borrowing lets the cycle approach the pure logic delay of those N rows.
In this RTL, N only changes the number of rows and the schedule.
