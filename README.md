# Residue-number ramp A/D and D/A converters

Residue number arithmetic stores an integer as its remainders modulo a few
small, pairwise coprime moduli. Here the moduli are 11, 13, 15 and 16, so there
are 11·13·15·16 = 34320 distinct values, about 15 bits. Addition, subtraction
and multiplication then work digit by digit, with no carries. Each digit
operation is small enough to be a 256-word lookup table. Such arithmetic is
fast and cheap. What is usually hard is getting numbers into and out of
residue form.

This design avoids that problem with **ramp-type converters whose counter counts
in residue form**. A residue counter is just one modulo-m counter per digit, all
clocked together. It has no carry chain, so it is as fast as its smallest
counter. A ramp voltage rises 1 mV per count alongside it. So at every moment
the counter holds, in residue form, the ramp voltage in millivolts:

* **A/D:** when the analog input drops below the ramp, copy the counter.
  The copy is the input voltage as a residue number.
* **D/A:** when the counter equals the number to be output, sample the ramp
  onto a hold capacitor. The held voltage is that number in millivolts.

Neither direction ever converts between residue and binary form. One counter and
one ramp serve any number of input and output channels. Around the converters
the design adds the residue processing that the scheme is meant to feed:

* lookup-table adders and multipliers,
* a Horner polynomial evaluator that corrects the non-linearity of a cheap ramp,
* a linear (FIR) filter on the output side,
* an adder/multiplier unit for a microcomputer bus.

```
            vin ──►(+)                                   ┌─────────────► adc_data / adc_valid
ramp ──┬───────►(−) analog_comparator ─► input_register ─► poly_eval ──┘    (to an FFT or other processor)
       │                                   ▲ count
       │   clk ─► residue_counter (÷11 ÷13 ÷15 ÷16) ──► count ─────────────┐
       │                                                                   ▼
       │       dac_data ─► poly_eval ─► linear_filter ─► output_register ─► equality_comparator
       │                                                                   │ match
       └────────────────────────────────────────────────────► sample_hold ◄┘ ─► vout
  ramp_generator (restarts when the counter wraps)

  residue_io_unit: A, B registers; A+B and A×B readable over a small bus (moduli 15, 16)
```

## Residue numbers as used here

A residue number is a packed array `logic [N-1:0][3:0]`. Digit `i` is the value
modulo `MODULI[i]`. With the defaults, digit 0 is mod 11, digit 1 is mod 13,
digit 2 is mod 15 and digit 3 is mod 16. Every digit takes 4 bits. Moduli are
passed as a packed parameter with one byte per modulus:
`MODULI = {8'd16, 8'd15, 8'd13, 8'd11}`, so `MODULI[0]` = 11.
`rns_pkg` defines the two standard sets:

| set        | moduli          | range      | bits | sweep length |
|------------|-----------------|------------|------|--------------|
| 15-bit     | 11, 13, 15, 16  | 0 … 34319  | 16   | 34320 clocks |
| 8-bit      | 15, 16          | 0 … 239    | 8    | 240 clocks   |

For example, with moduli 15 and 16, the value 100 is (100 mod 15, 100 mod 16) = (10, 4).

All arithmetic is modulo the product of the moduli (34320). There are no
negative numbers, no fractions and no overflow detection: 34319 + 1 is 0. This
matters most for the correction polynomials (see below).

## The converter core

### Residue counter and ramp

`residue_counter` contains one `mod_counter` per modulus, all on the same clock
and increment. At count c, digit i holds c mod MODULI[i]. The counter passes
through all 34320 values and every digit returns to 0 on the same edge. That is
the one clock in which every digit stands at its modulus minus one (`at_max`).
`at_zero` marks count 0, the start of a sweep. In the top level the counter runs
freely, one count per clock.

`ramp_generator` models the analog ramp. Its output is `count × STEP_UV`
microvolts, 1 mV per count by default. The ramp falls back to 0 V on the
increment that wraps the counter. One sweep is 0 … 34.319 V. At a 1 GHz clock a
sweep takes 34.3 µs (240 ns for the 8-bit set). That is also the sample period
of every converter channel.

### A/D channel

`analog_comparator` has the input on its + terminal and the ramp on its −
terminal. Its output stays high while the input is above the ramp.

`input_register` is armed at the start of each sweep. It loads the counter in the
first clock of the sweep in which the comparator is low, then disarms until the
next sweep, so comparator chatter cannot load it twice. The loaded value is the
first count whose ramp voltage is not below the input. For an input between
(k−1) mV and k mV, that count is **k**: the input in millivolts, rounded up.

* `valid` pulses one clock after the load.
* If the input stays above the top of the ramp for a whole sweep, `overrange`
  pulses at the end of that sweep. The register then keeps its previous value.

### D/A channel

`output_register` holds the number to be output. The equality comparator
(`equality_comparator`) compares it bit for bit with the counter. In the one
clock per sweep in which they agree, it closes the sample switch. `sample_hold`
then keeps the ramp voltage present at the end of that clock: `value × 1 mV`.

The match recurs every sweep, so the held voltage is refreshed once per sweep.
`pending` is high from the moment a new value is written until it has first
been sampled. A new value reaches the output within one sweep (≤ 34320 clocks).

### The analog parts are models

The ramp generator, the comparator and the sample-and-hold stand for analog
circuits. They are written as simple synchronous or combinational behavioural
models, not as hardware to synthesise. Voltages are signed 32-bit integers in
microvolts (`rns_pkg::uvolt_t`) rather than `real`, so every file elaborates in
synthesis front ends too.

The models are ideal:

* the ramp is exactly linear,
* the comparator has no offset unless `OFFSET_UV` is set,
* the hold capacitor neither droops nor remembers earlier samples.

A real ramp may be cheap and non-linear, for example an RC ramp. The correction
stages below exist for that case.

## Residue arithmetic by table lookup

`residue_rom` is one 256 × 4 table. The two operand digits are concatenated into
the address `{a, b}`, and the word there is `(a op b) mod M`. Parameter `OP`
selects the operation:

* `RNS_ADD`: a + b
* `RNS_SUB`: a − b
* `RNS_MUL`: a × b

The contents are computed at elaboration by `rns_pkg::table_entry`. Addresses
with a digit ≥ M never occur with valid operands. They hold the result for the
operands reduced mod M.

`residue_alu` uses one such table per digit. For the 15-bit set that is four
tables per operation, for the 8-bit set two. The read is combinational, like an
asynchronous PROM. For a power-of-two modulus a 4-bit binary adder would do the
same job as the table. The table is kept here for uniformity.

## Correction and filtering stages

The intended signal chain is a five-stage pipeline:

1. A/D
2. correction polynomial
3. the processing itself (for example an FFT)
4. pre-correction polynomial and linear filter
5. D/A

The sample rate is set by the slowest stage, here the 34320-clock sweep.
Stage 3 is not part of this design. The top level brings its input and output
out as `adc_*` and `dac_*` ports.

### `poly_eval`: Horner evaluator, p ← a + x·p

`poly_eval` has three storage elements:

* the B latch, which holds the variable x,
* a circulating shift register that holds the coefficients,
* the P register, which holds the running value.

In each clock, the multiplier tables form x·P and the adder tables add the
coefficient at the head of the shift register. The sum goes back into P and the
shift register rotates one place. After `ORDER+1` clocks (9 for the default
eighth-order polynomial) P holds a₈x⁸ + … + a₁x + a₀, all mod 34320. The
coefficients are then back where they started. A step is one multiplier access
followed by one adder access. With 50 ns tables a step takes about 100 ns, so
one evaluation takes about 1 µs.

* **Loading coefficients:** pulse `coef_shift` ORDER+1 times while idle,
  highest power first.
* **After reset:** the coefficients are those of y = x, so the chain passes
  data through unchanged until it is calibrated.
* **Handshake:** `start` with x takes one evaluation. `start` is ignored while
  `busy`. `done` pulses when `y` is valid, ORDER+1 clocks after the start was
  taken.

What the polynomial can do is limited by the arithmetic. It computes an
**integer polynomial modulo 34320**. A correction that needs fractional
coefficients, such as a truncated series for an exponential ramp, must first be
scaled to integers. The result must also stay inside 0 … 34319. Finding the
coefficients is a calibration step outside this design: measure the built
converter, fit, then load.

### `linear_filter`: residue FIR

`linear_filter` computes y[n] = Σ c[j]·x[n−j] over `TAPS` taps (default 4). It
uses one residue multiplier and one residue adder, one tap per clock, and needs
`TAPS` clocks per sample. On the output side such a filter can compensate a hold
capacitor that remembers part of its previous voltage.

* **After reset:** c[0] = 1 and the other coefficients are 0 (pass-through).
* **Loading coefficients:** `coef_shift` shifts coefficients in, `c[TAPS-1]`
  first and `c[0]` last.

## Microcomputer adder/multiplier (`residue_io_unit`)

`residue_io_unit` is a peripheral for a small processor. The processor writes
two operands and reads their residue sum and product. A program built from such
accesses can evaluate polynomials, dot products or FFT butterflies. By default it
uses the 8-bit set (15, 16), so a residue number is one byte.

| addr | write         | read          |
|------|---------------|---------------|
| 0    | operand A     | A             |
| 1    | operand B     | B             |
| 2    | –             | A + B         |
| 3    | –             | A × B         |

Writes happen on the clock edge with `wr` high. Reads are combinational.

## Top level: `rns_converter_system`

| parameter    | default            | meaning                                   |
|--------------|--------------------|-------------------------------------------|
| `N`, `MODULI`| 4, {16,15,13,11}   | residue digits and moduli of the converters|
| `NUM_IN`     | 1                  | A/D channels (comparator, input register, correction) |
| `NUM_OUT`    | 1                  | D/A channels (pre-correction, filter, output register, comparator, S/H) |
| `STEP_UV`    | 1000               | ramp step in µV                           |
| `CORR_ORDER` | 8                  | degree of the correction polynomials      |
| `TAPS`       | 4                  | output filter taps                        |
| `IO_N`, `IO_MODULI` | 2, {16,15}  | residue numbers of the I/O unit           |

The ports are:

* `clk`, and `rst`, a synchronous active-high reset.
* `vin_uv[NUM_IN]` and `vout_uv[NUM_OUT]`, the analog sides in µV.
* The A/D side, towards the processing stage:
  * `adc_data[]` with `adc_valid` (one result per sweep per channel),
  * `adc_overrange`,
  * `adc_coef_shift`/`adc_coef_in` to load the correction coefficients.
    Shift them in during the clocks right after that channel's `adc_valid`:
    the corrector is then idle and the next conversion is most of a sweep
    away. A shift during an evaluation is lost (an assertion reports it).
* The D/A side, from the processing stage:
  * `dac_data[]`, taken when `dac_valid` and `dac_ready` are both high,
  * `dac_pending`,
  * `dac_coef_shift`/`dac_filt_shift`/`dac_coef_in` to load the
    pre-correction and filter coefficients, while `dac_ready` is high and no
    number is being sent.
* The I/O bus: `io_addr`, `io_wr`, `io_wdata`, `io_rdata`.

The clock timing is:

* A/D: `adc_valid` comes CORR_ORDER+3 clocks after the ramp passes the input.
* D/A: a number taken on `dac_data` reaches the output register
  CORR_ORDER+TAPS+3 clocks later. The output voltage follows at the next
  matching count, at most one sweep later.
* A D/A channel accepts a new number every CORR_ORDER+2 clocks.

## What comes from the original scheme and what is added

These parts follow the original scheme:

* the moduli 11, 13, 15, 16 and 15, 16,
* the residue counter of per-digit modulo counters clocked together,
* the 1 mV-per-count ramp over 34320 counts,
* loading the input register when the input falls below the ramp,
* sampling the ramp when the output register matches the counter,
* sharing the counter and ramp between channels,
* 256 × 4 tables addressed by the concatenated digits,
* the Horner evaluator: B latch, coefficient shift register, P register,
  eighth order,
* the adder/multiplier with two operand registers and separate sum and product
  read locations,
* the five-stage pipeline.

These are this design's own choices:

* synchronous reset everywhere;
* arming the input register once per sweep, and the overrange flag;
* round-up quantisation, which follows from "input less than ramp";
* the `pending` flag and the valid/ready handshakes;
* identity coefficients after reset;
* the coefficient loading order;
* 4 filter taps and the sequential filter structure;
* the I/O register map and read-back;
* one input and one output channel by default;
* an ideal linear ramp;
* voltages as integer microvolts;
* restarting the ramp from the counter's wrap signal.

These are not included:

* the FFT processor, which is only named as a stage;
* any particular non-linear ramp model, and the calibration that would produce
  real correction coefficients;
* the microcomputer itself.

## Verification

Each module has a self-checking testbench in `tb/`, which prints
`TB_RESULT checks=N failures=M`:

* `tb_residue_counter`: two full 34320-count sweeps compared digit by digit
  with c mod m.
* `tb_residue_rom` and `tb_residue_alu`: exhaustive and random checks against
  integer arithmetic mod m and mod 34320.
* `tb_input_register`: random input voltages, over-range inputs and a
  glitching comparator.
* `tb_poly_eval`: random degree-8 polynomials, checked against Horner in
  integers, and the 9-clock latency.
* `tb_linear_filter`: random taps, checked against a convolution, and the
  4-clock latency.
* `tb_rns_converter_system`: the whole system at its default parameters. It
  runs A/D conversions with identity and loaded correction, overrange, D/A
  output with identity and loaded pre-correction and filter, a D/A → A/D
  loop-back and the I/O unit. It checks one conversion per 34320-clock sweep,
  counts each of these mechanisms and fails if any never happened. It
  simulates a few dozen sweeps (about a million clocks) in seconds.

* `tb_rns_converter_8bit_2ch`: the system in its 8-bit setting (moduli 15,
  16, 240-clock sweep) with two input and two output channels on one counter
  and ramp. One channel has identity correction and the other loaded
  polynomials. It checks 40 sweeps of both channels.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps -Irtl -y rtl -y tb +libext+.sv \
    rtl/rns_pkg.sv tb/tb_rns_converter_system.sv --top-module tb_rns_converter_system
./obj_dir/Vtb_rns_converter_system
```

Replace the testbench name to run another. `rns_pkg.sv` must be read first.
The testbenches generate all their stimulus and read no files.
