# FPGA emulation for wordlength optimization of DSP datapaths

Choosing the fixed-point wordlength of every signal in a DSP datapath is a
search: each candidate configuration must be scored for accuracy (mean square
error, bit error rate) and for cost, and an optimizer on a host computer tries
hundreds of them. Scoring accuracy by logic simulation is the slow step. This
RTL moves it onto an FPGA: the DSP design is built once at its full
wordlength, every signal under optimization passes through a *bit switch*
that clears its unused low-order bits, and the host only writes new
wordlengths over a serial link, starts a run and reads back an error figure.
A run streams one sample per clock cycle, so millions of samples take
milliseconds instead of minutes.

The RTL follows the hardware side of the framework described in
"FPGA-Based Wordlength Optimization for DSP" (an optimizer on a PC, an
FPGA emulator, and an ASIC synthesis server for area): two emulation
systems, one for FIR filters scored by MSE and one for a Viterbi-Viterbi
carrier phase recovery scored by BER. The optimizer and the synthesis flow
are software and are not part of this RTL. Many details (number formats,
coefficients, link protocol, noise models, the inside of the phase
recovery) are not fixed by that description and are this design's own; they
are listed in [Where this design fills in](#where-this-design-fills-in).

## Imposing a wordlength: the bit switch

`bit_switch` takes a W-bit signal and a wordlength `wl` and keeps the `wl`
most significant bits, ANDing the rest with 0:

| `wl`        | output                                    |
|-------------|-------------------------------------------|
| 0           | all zero (the signal is removed)          |
| 1 .. W-1    | top `wl` bits kept, low `W-wl` bits zero  |
| W or more   | unchanged                                 |

Because the sign and integer bits stay and the fractional bits go, a bit
switch behaves like truncating the signal's fractional part at `wl` bits of
total width. It is pure combinational logic, so it adds no latency and the
emulated datapath keeps its timing for every configuration.

## FIR system (`fir_emulator`)

```
          uart_rx/uart_tx <-> control_unit (param_ram)
                                   | wordlengths, run length
 input_data_generator --+--> BS --> fir_transposed (BS per tap) --> BS --> mse_evaluator --> result
                        |                                                      ^
                        +-----------> fir_transposed (full wordlength) --------+ reference
```

* **Stimulus.** `input_data_generator` produces full-scale uniform white
  noise (top 16 bits of a 32-bit xorshift generator). The sequence restarts
  at every run, so every configuration sees identical input and results are
  repeatable bit for bit.
* **Filter.** `fir_transposed` is a transposed-form FIR: each input is
  multiplied by all coefficients at once and the products run through a
  chain of adders and registers toward the output. Each product (16x16 bits)
  is truncated to a `PROD_W`-bit signal, Q1.(PROD_W-1), which passes a bit
  switch with its own wordlength: the tap multiplier outputs are the
  signals under optimization. The accumulator is `PROD_W + clog2(TAPS)`
  bits wide, so no sum overflows. Default: 15 taps, `PROD_W` = 16 (the
  14th-order case, product wordlengths 0..16). The 29th-order case is
  `TAPS=30, PROD_W=24`.
* **Coefficients** are a symmetric triangular low-pass,
  `h[k] = floor(min(k+1, TAPS-k) * (2^15-1) / S)` with `S` the sum of the
  `min()` terms, i.e. a DC gain just below 1. Replace `coef_of()` in
  `fir_transposed.sv` to emulate another filter.
* **Reference.** A second `fir_transposed` at full wordlength receives the
  same input; `mse_evaluator` squares the difference of the two outputs and
  accumulates it for `num_samples` samples. The result is the 64-bit
  saturating **sum** of squared errors in units of the output LSB squared;
  the host divides by the sample count (and by 2^(2*(ACC_W-1)) for a
  full-scale-relative MSE). No divider is needed in hardware.
* **Batch lanes.** With `BATCH = N`, N copies of the filter, each with its
  own wordlength set, run in parallel on the same input against the one
  reference, so one run scores N configurations. Each lane also has an
  input and an output bit switch (reset to full width).

Timing: the run starts two cycles after the start command, consumes one
sample per cycle, and ends `num_samples` + 3 cycles later (20000 samples
took 20006 busy cycles in simulation).

### FIR parameter map

| address                    | content                                   |
|----------------------------|-------------------------------------------|
| 0..3                       | samples per run, most significant byte first |
| 4 + b*(TAPS+2)             | lane b input wordlength (0..16)           |
| 4 + b*(TAPS+2) + 1 + k     | lane b, tap k product wordlength (0..PROD_W) |
| 4 + b*(TAPS+2) + TAPS + 1  | lane b output wordlength (0..ACC_W)       |

Result: `8*BATCH` bytes, lane `BATCH-1` first, each lane's 64-bit sum most
significant byte first.

## Phase recovery system (`vv_emulator`)

```
 transmitter -> channel -> vv_dsp -> qam16_demodulator -> ber_analysis -> result
 (xorshift +    (phase      (5 bit                          ^
  16-QAM map)    walk +      switches)                      | transmitted bits
                 noise)                                     +--- FIFO
```

* **Transmitter.** Four random bits per symbol, Gray-mapped per axis to
  16-QAM levels {-3A, -A, +A, +3A} with A = 256 on 12-bit I and Q:
  `b1 b0 = 00 -> -3A, 01 -> -A, 11 -> +A, 10 -> +3A`.
* **Channel.** The carrier phase performs a random walk of `pn_step`
  units of 2^-16 turn per symbol and rotates the symbol (CORDIC). Then
  noise is added to I and Q: the sum of four independent uniform signed
  bytes (zero mean, standard deviation about 147.8, close to Gaussian)
  scaled by `sigma/128`, giving a standard deviation of about
  1.155*`sigma` LSB.
* **Analysis.** Transmitted bits enter a 64-deep FIFO; each demodulated
  symbol takes the oldest entry. Sent and received bits are therefore paired
  by order, whatever the receiver latency. Bit errors and bits are counted
  for `num_symbols` received symbols; the host computes BER = errors / bits.
  `fifo_error` flags a lost pairing, which the tests check never happens.

### Inside `vv_dsp`

This is the hardest part of the design. The 16-QAM points on the inner
ring (|I| = |Q| = A) and the outer ring (|I| = |Q| = 3A) sit on the
diagonals, like QPSK; raising them to the fourth power removes the data
and leaves four times the carrier phase. The pipeline advances one step per
input symbol (it stalls with `in_valid`), and each of the five signals the
optimizer controls has its bit switch:

| step | signal | format (bits) | bit switch |
|------|--------|---------------|-----------|
| 1 | magnitude `m = (I^2+Q^2) >> 13` (inner 16, middle 80, outer 144) | 8 unsigned, saturated | `wl_mag` (2..8) |
| 2 | partitioned output `p = r >> 4` if `m < 48` or `m >= 112`, else 0 | 8 signed per axis | `wl_part` (2..8) |
| 3 | 2nd power `p^2 >> 3` | 12 signed per axis, saturated | `wl_pow2` (2..12) |
| 4 | 4th power `(p^2)^2 >> 9` | 12 signed per axis, saturated | `wl_pow4` (2..12) |
| 5 | sliding sum `S` of the last `WIN` = 64 fourth powers | 18 signed | - |
| 6 | phase `theta = (arg(S) + pi) / 4`, in [-pi/4, pi/4) | 10 signed, 2^-12 turn | `wl_phase` (2..10) |
| 7 | unwrapped phase `phi` | 16, 2^-16 turn | - |
| 8 | output `r` delayed, rotated by `-phi` | 12 per axis | - |

The `+ pi` in step 6 is there because `(A(1+j))^4 = -4A^4`: the fourth
power of an undistorted diagonal point points along the negative real axis.

**Unwrapping.** `theta` is only known modulo pi/2 (the four quadrants look
the same after the fourth power). Each step moves `phi` by
`theta - phi` reduced into [-pi/4, pi/4) (the low 14 bits of the 16-bit
binary-angle difference, sign-extended), so `phi` follows the carrier phase
continuously past +-45 degrees instead of jumping. `phi` is held while `S`
is zero (start-up).

**Alignment.** The sum that includes symbol n is centred on symbol
n - WIN/2, so the symbol path is a shift register that delays each symbol
by WIN/2 + 5 steps, bringing it to the rotator together with the estimate
centred on it. Latency is `LAT = WIN/2 + 6` input steps: the first output
accompanies input number `LAT` and carries input 0.

**Cycle slips.** There is no differential coding. Under heavy noise the
estimate can slip by a quarter turn; all later symbols are then decided in
the wrong quadrant until it slips back, and the BER of the run jumps to
tens of percent. In simulation with full wordlengths, the default window
of 64 and `pn_step` = 5, 1.5 million bits give a BER of about 7e-3 at
`sigma` = 95, 1.3e-2 at 105 and 2.2e-2 at 115, all without slips. A window
of 32 slips already at `sigma` = 80. Choose the channel settings with this
in mind.

### VV parameter map

| address | content |
|---------|---------|
| 0..3 | symbols per run, MSB first (1.5 million bits = 375000 symbols) |
| 4 | magnitude wordlength |
| 5 | partitioned output wordlength |
| 6 | 2nd-power wordlength |
| 7 | 4th-power wordlength |
| 8 | phase wordlength |
| 9 | noise scale `sigma` |
| 10 | phase-noise step `pn_step` |

Result: 8 bytes, bit errors (32 bits) then bits counted (32 bits), MSB first.
A run of N symbols keeps the system busy for N + 47 cycles at the default
window.

## Host link and command protocol

Each system has its own UART (`uart_rx`, `uart_tx`; 8N1, `CLKS_PER_BIT`
= 868, i.e. 115200 baud from a 100 MHz clock) and a `control_unit` holding
the parameters in a `param_ram` whose bytes all reset to `FF` (full
wordlength everywhere).

| host sends | meaning | FPGA answers |
|-----------|---------|--------------|
| `01 aa dd` | write byte `dd` at parameter address `aa` | `A5` |
| `03 aa` | read parameter address `aa` | the byte |
| `02` | run one evaluation with the current parameters | the result bytes, when done |

Unknown command bytes are ignored; bytes that arrive during a run are
ignored. A typical optimizer step is: write the changed wordlengths, send
`02`, read the result.

## Shared pieces

* `wlo_pkg` - command codes, the saturating shift `sat_shift()` used as the
  quantizer between stages, and a 4-bit popcount.
* `xorshift_rng` - 32-bit xorshift (x ^= x<<13, x ^= x>>17, x ^= x<<5),
  with a load input for reproducible runs.
* `cordic` - 14-iteration CORDIC in rotation or vectoring mode on binary
  angles (2^16 = one turn), unrolled and registered once, with 4 guard
  bits and gain compensation (x 19899/2^15), so magnitudes are kept. The
  micro-rotation table is `round(atan(2^-i) / (2*pi) * 2^16)`.
* `wlo_top` - both systems side by side, each with its own serial pins;
  they share only clock and reset.

## Where this design fills in

Taken from the framework: the block structure of both systems (control
unit, communication interface, input generator, bit switches around and
inside the DSP design, accuracy evaluator; transmitter with random number
generator and modulator, channel with additive Gaussian and phase noise,
receiver with VV DSP, demodulator and BER analysis, parameter RAM); bit
switches clearing unused bits with AND; transposed FIR structure with 15 or
30 coefficients and bit switches on the tap multiplier outputs (0..16 and
0..24 bits); batch evaluation of several configurations in parallel; the
five VV signals and their wordlength ranges; 1.5 million bits per BER run.

This design's own choices: the UART link and command protocol; the
parameter map and result formats (error sums instead of divided MSE/BER);
the full-wordlength reference filter; white-noise stimulus; 16-bit data and
coefficients and the triangular coefficient set; product truncation;
16-QAM with Gray mapping and all scalings in `vv_dsp`; ring thresholds;
window length 64; CORDIC for arg and rotation; the unwrapping rule; the
noise and phase-noise generators; FIFO pairing in the analysis unit. The
inside of the VV phase recovery in particular is a straightforward
Viterbi-Viterbi design with QPSK partitioning written for this emulator,
not a reproduction of any specific published implementation: middle-ring
symbols are simply left out of the estimate.

Defaults are the 14th-order filter with one batch lane. The 29th-order
filter (`TAPS=30, PROD_W=24`) and batch size 2 (`BATCH=2`, or `FIR_BATCH=2`
on the top) are parameter settings and are covered by the testbenches.

## Simulating

All RTL is in `rtl/`, one module or package per file; testbenches are in
`tb/`. Each testbench is self-checking and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/wlo_pkg.sv tb/fir_model_pkg.sv \
  tb/tb_wlo_top.sv --top-module tb_wlo_top -o sim
./obj_dir/sim
```

(`tb/fir_model_pkg.sv` is only needed by the testbenches that use it:
`tb_fir_emulator`, `tb_wlo_top`, `tb_wlo_full`.)

| testbench | what it shows |
|-----------|---------------|
| `tb_wlo_full` | top at default parameters: a 20000-sample FIR run checked bit-exactly against a software model, and a 375000-symbol (1.5 Mbit) VV run; both at one sample/symbol per cycle |
| `tb_wlo_top` | both systems at once over their links, two FIR lanes; counts that every mechanism occurred (batch, tap bit switch, tap removed, full wordlength = 0 error, noise errors, phase unwrapping past 45 degrees, coarse phase wordlength raising errors) |
| `tb_fir_emulator` | FIR system: exact error sums for two lanes, read-back, repeatability, output wordlength; the same for a two-lane 30-tap, 24-bit-product instance |
| `tb_vv_emulator` | VV system: no errors without noise or with phase noise alone, errors growing with noise, coarse phase worse, repeatability |
| `tb_vv_dsp` | latency and order, phase tracking within 1 degree for a constant phase and a ramp to 100 degrees |
| others | one per block (`tb_<module>`), against independent models |

`tb/fir_model_pkg.sv` is a bit-accurate model of a FIR run (generator,
quantization, bit switches, reference) used to check the returned error
sums exactly. `tb/uart_host.sv` models the host's serial port.

## Size

At default parameters the top synthesizes (generic coarse synthesis) to
about 3900 word-level cells and 4300 flip-flops, plus 512 memory bits (the
VV analysis FIFO, which holds max(64, 2*WIN) symbols). Most of the multipliers are the 2 x 15 tap multipliers
of the FIR system and the squaring stages of `vv_dsp`.
