# Programmable CIC decimator and interpolator in carry-save arithmetic

A cascaded-integrator-comb (CIC) filter changes the sample rate of a signal
without a single multiplier. It uses N integrators running at the high rate
fs and N combs (differentiators) running at the low rate fs/R. The filter
cascade has the response

    H(z) = ( (1 - z^-RM) / (1 - z^-1) )^N

This is a moving sum of length R*M, applied N times. It suppresses the images
and aliases at the multiples of fs/R. The DC gain is (RM)^N.

This RTL builds such a filter for the baseband of a PSK modem:

* **three stages** (N = 3) with a **differential delay of one** (M = 1; M = 2 is a parameter option);
* a rate change that can be **selected at run time from 2^1 to 2^6**;
* **carry-save arithmetic** in every integrator, comb and in the rate counter.
  With carry-save, no carry ripples along a word between two registers. The
  longest path between registers is two full-adder delays, whatever the word length.

Two filters are provided. The **decimator** (`cic_decimator`) lowers the rate
on the receive side. The **interpolator** (`cic_interpolator`) raises the rate
and shapes the pulses on the transmit side. `cic_top` instantiates them side
by side.

## Signal flow

Decimator, all in one clock domain (the clock is fs):

    x_in ─► input_scaler ─► INT ─► INT ─► INT ─┬─► COMB ─► COMB ─► COMB ─► CPA ─► y_out
             (÷R^N)        (carry-save, every   │   (carry-save, on the   (binary,
                            clock, fs)          │    enables, fs/R)        y_valid)
    sel ─► prog_decimator ──── rate_en ─────────┴─► en_d[0] ► en_d[1] ► en_d[2] ► en_d[3]

Interpolator:

    x_in ─► input_scaler ─► COMB ─► COMB ─► COMB ─► zero-stuff ─► INT ─► INT ─► INT ─► CPA ─► y_out
             (÷R^(N-1))     (on x_ready, fs/R)      (1 of R cycles) (every clock, fs)   (every clock)

The "resampling switch" between the two sections is not a second clock. The
rate generator makes a one-cycle enable, `rate_en`, once every R cycles. The
comb stages load only on enabled cycles. The enable passes down a short shift
register, so comb k loads one fs cycle after comb k-1. As a result, the
pipeline registers between the combs add one fs cycle each, not one low-rate
sample. The divided square-wave clock is still available as `rate_clk`.

## Number format, scaling and why overflow does not matter

This is the part of the design that most needs explaining.

**Word length.** A gain of (RM)^N means the result needs

    B_out = B_in + N*log2(R*M)

bits. With an 8-bit input, R up to 64 and M = 1, that is 8 + 3*6 = **26 bits**.
Every integrator and every comb carries the full 26-bit word. Nothing is
truncated or rounded inside the filter.

**Scaling at the input.** Each integrator adds a gain of R. `input_scaler`
divides the input by R once per stage, so the filter as a whole has unity DC
gain. Think of the 26-bit word as a fixed-point number with 18 fraction bits
(N * 6) and 8 integer bits. The scaler sign-extends the 8-bit sample and
places it N*log2(R) bits below the integer part. For R = 64 this puts the
sample in the 8 lowest bits; for R = 2 it is shifted 15 places up. The
division is therefore exact. After the filter, the integer part
(`y_int = y_out[25:18]`) has the range of the input, and a constant input
comes out unchanged. The fraction bits keep the full precision of the
smoothing. The interpolator's DC gain is (RM)^N / R, so its scaler divides by
R^(N-1) instead.

**Wrap-around.** The integrators overflow all the time: their state grows
without limit for any input with a non-zero mean. This is harmless and needs
no guard logic. All adders work modulo 2^26. The comb section computes
differences of integrator values, and as long as the final result fits in 26
bits, these differences are exact modulo 2^26. Carry-save arithmetic keeps
this property: the carry out of the top bit is simply dropped.

## Carry-save stages

A value v is held as two words, v = s + c (mod 2^W). The carry word is stored
already shifted into place, so its bit 0 is free. `cs_adder_row` is a row of
full adders that turns three words into a new (s, c) pair without any carry
propagation. The new carry word's bit 0 comes from a carry-in.

* **`cs_integrator`**: registers the incoming pair, then adds
  `in_s + in_c + state_s + state_c` with two adder rows and writes the result
  back to the state. Its output goes to the next stage as a pair.
  Latency: the state in cycle t holds the sum of inputs up to t-2.
* **`cs_comb`**: computes `in - delayed` as
  `in_s + in_c + ~d_s + ~d_c + 2`. The two "+1" terms of the two
  two's-complement negations go in through the free carry-in bits of the two
  rows. The output registers are the pipeline registers between comb stages.
  The delay line holds M pairs.
* **`prog_decimator`**: a counter made of half adders. Stage 1 adds the
  constant 1 to its sum bit. Each later stage adds the *registered* carry of
  the stage before it. Sum bit k is then a square wave of period 2^k (k-1
  cycles behind a binary counter). A multiplexer picks bit `sel`. Its rising
  edge makes `rate_en`.

Only one carry-propagate adder remains: the registered output adder that
turns the last stage's pair into a binary word. It is 26 bits wide and sits
outside every feedback loop.

## Interfaces and timing

`sel` (3 bits) is log2 R: 1..6 gives R = 2..64. A value of 0 acts as 1, and 7
acts as 6. Reset is synchronous and active low, and clears every register.
`cic_top` groups the decimator's signals under `dec_*` and the
interpolator's under `int_*`. Both filters share `clk` and `rst_n`.

**Decimator.** It takes one input sample per clock. `y_valid` is high for
one cycle in every R, and `y_out` then holds a new result. Define I_N[n] as
the N-fold running sum of the scaled inputs, where sample n is presented in
cycle n. The result shown with `y_valid` in cycle t is then

    y(t) = sum_j (-1)^j C(N,j) I_N[t - L - j*R*M],   L = 3N + 1 = 10 cycles

That is 2 cycles per integrator, 1 per comb and 1 for the output adder. `sel`
may change while the filter runs. The first N+1 results after the change mix
the two rates; after that the output is exact again. No reset is needed,
because the combs remove whatever state the integrators had.

**Interpolator.** It takes `x_in` in the cycle where `x_ready` is high, once
every R cycles, and gives one result per clock. A sample taken in cycle t
enters the integrators in cycle t+N. The output in cycle c is the N-fold
running sum of that zero-stuffed sequence at c - (2N+1). For an interpolator,
leftover integrator state from the old rate would leave a DC error that never
decays. So a change of `sel` clears the whole interpolator for one cycle,
just like a reset. A sample offered in that cycle is lost.

## Parameters

All modules take their defaults from `cic_pkg`.

| parameter   | default | meaning |
|-------------|---------|---------|
| `N`         | 3       | number of integrator and comb stages |
| `M`         | 1       | differential delay, 1 or 2 |
| `IN_WIDTH`  | 8       | input sample width, two's complement |
| `RATE_BITS` | 6       | largest rate is 2^RATE_BITS |
| `SEL_WIDTH` | 3       | width of `sel` |

Two widths are derived: the word width W = IN_WIDTH + N*(RATE_BITS + log2 M),
which is 26, and the fraction width FRAC = N*RATE_BITS, which is 18. The
integer output is W - FRAC bits wide. This is 8 bits for M = 1 and 11 bits for
M = 2, because M = 2 adds a gain of 2^N that the scaler does not remove.

At the defaults, generic synthesis of `cic_top` gives about 990 flip-flop
bits, plus 285 bits in the comb delay lines. The decimator alone is about 480
flip-flop bits plus 155 delay-line bits.

## Where this design makes its own choices

The following follow the source description: the architecture, the defaults
(three stages, M = 1, 2^1..2^6), the word length rule, the carry-save
integrator, comb and counter, the input scaler and the pipelined combs.
These are choices made here:

* The 8-bit input width. The reference stimulus is a step of 127.
* The exact fixed-point scaling, with 18 fraction bits and no truncation.
  The description allows the low bits of later stages to be truncated or
  rounded; this is not done, and every stage carries all 26 bits.
* The adders have true outputs. The description uses adders with inverted
  sum and carry outputs, which is a circuit-level speed measure with the same
  arithmetic.
* A clock enable instead of a divided clock for the comb section, and comb
  stages staggered by one fs cycle.
* The `sel` encoding, with clamping of 0 and 7.
* The interpolator's `x_ready` handshake, its R^(N-1) scaling, its
  zero-insertion rate expander and its self-clear on a rate change.
* The registered output adder, and synchronous reset.

The non-pipelined form of the decimator is not built. Its only role is to
motivate the pipeline registers. No timing analysis was done. The two
full-adder-delay paths follow from the structure, but no clock frequency is
claimed.

## Files

| file | contents |
|------|----------|
| `rtl/cic_pkg.sv` | default constants and the width functions |
| `rtl/cs_adder_row.sv` | 3:2 carry-save adder row |
| `rtl/cs_integrator.sv` | carry-save integrator stage |
| `rtl/cs_comb.sv` | carry-save comb stage with pipeline registers |
| `rtl/prog_decimator.sv` | carry-save rate counter, select multiplexer, rate enable |
| `rtl/input_scaler.sv` | 1/R^S input scaling and sign extension |
| `rtl/cic_decimator.sv` | pipelined programmable CIC decimator |
| `rtl/cic_interpolator.sv` | pipelined programmable CIC interpolator |
| `rtl/cic_top.sv` | both filters side by side |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus `tb_cic_step_n1` |

## Simulation

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops on its
own. A watchdog ends it with a failure if it hangs. With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
        rtl/cic_pkg.sv tb/tb_cic_top.sv --top-module tb_cic_top
    ./obj_dir/Vtb_cic_top

Replace `tb_cic_top` with any other testbench name. To lint the RTL:
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/cic_pkg.sv rtl/cic_top.sv`.

The testbenches compare against models written with plain integer arithmetic
modulo 2^W. They do not reuse the carry-save logic.

* `tb_cs_integrator`, `tb_cs_comb`: random values are split into random
  carry-save pairs. The output must match a running sum, or a difference at
  M = 1 and M = 2, with the enables raised at random.
* `tb_prog_decimator`: for every `sel` code, the rate enable must come every
  2^k cycles, sit on the rising edge of `rate_clk`, and `rate_clk` must have a
  50 % duty cycle.
* `tb_input_scaler`: an exhaustive check over all inputs and `sel` codes.
* `tb_cic_decimator`, `tb_cic_interpolator`: every rate, with random data and
  then steps of +127 and -128. An M = 1 and an M = 2 instance run side by
  side; the M = 2 step result must be 8 times the input. Every output value, the output or input spacing
  of R cycles, and unity DC gain are checked. The interpolator is also changed
  to a new rate without a reset.
* `tb_cic_step_n1`: a single-stage decimator (N = 1) driven with a step of
  127 at R = 2..64. The output must be the exact ramp 127*min(n+1, R)/R and
  settle at 127.
* `tb_cic_top`: the whole design at its default parameters. It runs both
  filters together through all six rates without resets (in opposite orders)
  and checks both against their models. It then loops the interpolator's
  output into the decimator at R = 8, 64 and 2 and checks that steps pass with
  unity gain. It counts every rate, every rate switch, integrator wrap-around
  and the loop-back steps, and fails if any of them never happened.
