# Complex-baseband spatial–temporal radio channel platform

This is synthesizable SystemVerilog for a real-time test bench for
space/time (S/T) equalizers. It reproduces in digital hardware, at
24 Msamples/s, what an N-element antenna array at a base station would
receive from a desired mobile and an interfering mobile:

* multipath delays,
* Rayleigh fading of each path,
* the phase rotation that each path's direction of arrival (DOA) produces
  on each antenna element,
* receiver noise and filtering.

The element outputs go to two consumers. The first is a DSP, which receives
whole frames. The second is a parameter estimator: a QR-decomposition RLS
systolic array that finds the least-squares weights of an S/T-equalizer,
training on the unique word at the start of each frame.

Everything is complex baseband. Samples are 24-bit I plus 24-bit Q in two's
complement, with 20 fractional bits (so ±8 full scale). The estimator works
in 32-bit words with 24 fractional bits.

## Signal flow

```
 tx_source (desired) ─ link ─ fading_simulator K=3 ─┬ link ┐
                                                    ├ link ┼ array_response_sim ─┐
                                                    └ link ┘                      │
 tx_source (interf.) ─ link ─ fading_simulator K=2 ─┬ link ┐                      ├ element_combiner ─ elem_out[8]
                                                    └ link ┴ array_response_sim ─┘   (+ awgn_gen, rx_filter)
                                                                                       │
 uart_rx ─ sim_controller (registers, array_coef_calc) ─► all of the above             ├ dsp_frame_buffer ─ DSP port
                                                                                       └ param_estimator ─ DSP/PC port
```

Each physical unit of the channel is a separate block that receives its
input over a serial link. These units are:

* a transmitter,
* a user's fading/delay unit,
* each path's connection to the array simulator.

The serial link recovers the sample strobe and the frame mark from the bit
stream. Each unit runs on the strobe of its own link, not on a shared
enable, so the units can be rearranged simply by rewiring links.

`channel_platform` has five paths: three for the desired user and two for
the interferer. That covers both the 2 + 2 and the 3 + 1 path
configurations; a path is switched off by setting its attenuation to 0.

## Clocking and the serial links

There is one clock, and it equals the link bit clock. A link frame is
52 bits:

| Bits | Contents |
|---|---|
| `10` | header |
| 1 bit | sampling-timing bit |
| 1 bit | unique-word timing bit |
| 48 bits | data: 24-bit I, then 24-bit Q, MSB first |

52 bits × 24 Msamples/s = 1.248 Gb/s, so the full-speed clock is
1.248 GHz, and one sample lasts 52 clocks.

`link_serializer` sends an idle frame (sampling bit 0) whenever no new
sample is loaded. `link_deserializer` shifts the bits in and checks the
2-bit header once per 52-bit frame. While hunting, each bad header slips
the frame boundary by one bit. It declares lock after 8 consecutive good
headers and drops lock after 4 consecutive bad ones. When locked, it
presents the 48-bit sample with a one-clock `valid` and the frame mark `uw`.

There is no clock-recovery circuit. Both ends share `clk`, so only framing
has to be recovered. The electrical-to-optical conversion is not modelled:
the serial bit goes straight from serializer to deserializer.

At full size all seven links lock within about 500 clocks of reset.

## Transmitters

`tx_source` makes frames of `FRAME_LEN` symbols (default 320). The first
`UW_LEN` symbols (default 31) are the unique word:

* the unique word is the 31-chip m-sequence of x⁵+x²+1, sent as ±(1+j)/√2;
* each user starts the m-sequence from a different state (`uw_seed`), so
  the two users' words differ;
* the rest of the frame is QPSK or BPSK data from a 15-bit PN generator.

Each symbol is held for `SPS` = 4 samples, which gives 6 Msymbols/s. The
`uw` output marks the first sample of each frame. This mark travels with
the data through every link and pipeline stage, so each element output
sample carries its own frame mark, `elem_uw`.

## Fading: sum of sinusoids

`jakes_fading_gen` produces the complex envelope of one path:

  z = (1/√M) Σₘ exp(j(φₘ)),  φₘ advancing at f_D·cos(Θ₀ + 2π(m−1)/M)

Here M (1..16) is the number of component waves. The initial phases are
random, from a per-path 32-bit LFSR seed, so that paths fade independently.

On `init` the generator spends one clock per component wave working out its
phase increment and its random start phase. After that it is time-shared:
one component wave is advanced and accumulated per sample, and z is
refreshed every 16 samples (0.67 µs). This is about 750 updates per Doppler
period at the 2 kHz maximum. It is far finer than the fading, and it costs
one table look-up instead of 16.

The Doppler frequency is set as f_D/f_s·2³². The default, 357914, is
2000 Hz at 24 MHz.

`fading_simulator` holds one 128-sample delay memory per user; delay 0
bypasses it. Each path reads the memory at its own delay (0..127 samples in
41.7 ns steps), multiplies by its z (when fading is on), then by its real
attenuation.

Sines and cosines everywhere come from `sincos_rom`. It is a 1024-entry
table computed at elaboration, with a first-order correction for the
rounding remainder, which gives an error of about 5e-6.

## Array response

`sim_controller` holds the DOA of every path and the array geometry.
`array_coef_calc` turns these into coefficients a_n(θ), one per clock,
for every path and element. The spacing is half a wavelength:

* linear array: a_n = exp(jπ·n·sin θ)
* circular array of Ne elements, neighbours half a wavelength apart:
  a_n = exp(−j·π/(2 sin(π/Ne))·cos(θ − 2πn/Ne))

Elements at or above the active count Ne get 0. Phases are computed in
fractions of a turn, so the angle wraps for free.

`array_response_sim` multiplies each path by its N coefficients and sums
the paths for each element. `element_combiner` then does three things:

1. it adds the two users together;
2. it adds noise from `awgn_gen`, scaled by a per-element level;
3. it passes each element through an 8-tap real FIR, `rx_filter`, whose
   taps are set over the control link.

`awgn_gen` is a Box–Muller generator. It draws two uniform numbers per
element from xorshift32 generators. It then reads a 1024-entry radius
table, sqrt(−2 ln u), and the sine table.

## Control link

`uart_rx` receives 8N1 bytes at `CLKS_PER_BIT` clocks per bit (10833 gives
115.2 kbit/s at 1.248 GHz). `sim_controller` takes commands of six bytes:
`A5`, an address, then a 32-bit value MSB first.

| Address | Register |
|---|---|
| `00` | [0] fading on for the desired user, [1] fading on for the interferer, [2] circular array, [7:4] active elements, [8] BPSK |
| `01` | apply: restart the fading generators and recompute all coefficients |
| `10+k` | attenuation of path k (20 fractional bits) |
| `18+k` | delay of path k, in samples |
| `20+k` | DOA of path k, as a 16-bit fraction of a turn |
| `28+k` | [4:0] component waves M, [31:16] Θ₀ |
| `30+u` | f_D of user u, as f_D/f_s·2³² |
| `38+n` | noise level of element n |
| `40+t` | receiver-filter tap t |

Paths 0–2 belong to the desired user and paths 3–4 to the interferer.

The reset state is:

* all paths at gain 1, delay 0 and DOA 0, with 8 waves each;
* fading off, at 2 kHz;
* linear 8-element array;
* no noise;
* pass-through filter.

One coefficient pass runs automatically after reset.

## DSP frame port

`dsp_frame_buffer` stores one frame of 320 symbols × 8 elements, taking the
first sample of each symbol. The DSP pulses `dsp_arm`. Capture then starts
at the next frame mark, and `dsp_done` rises when the frame is complete.
The DSP can read the frame at any speed through `dsp_rd_sym`/`dsp_rd_elem`,
with one clock of latency.

## The parameter estimator

This is the part that needs the most explanation.

**What it solves.** Each training symbol s gives an input vector
x(s) = (x₁ … x_P) and a desired value y(s), which is the known unique-word
symbol. The array finds the weights w that minimize
Σ λ^(S−s) |y(s) − x(s)ᵀw|². It uses the square-root (QR) form of RLS: the
upper-triangular matrix R and the vector u are updated one vector at a time
by Givens rotations, and R·w = u holds at every instant.

**Cells.** Array row i (0 ≤ i < P) holds input element i; row P is the
reference y. Each cell multiplies its stored value by β = √λ before the
update.

* `qr_boundary_cell` is the diagonal cell of row i. It holds the real value
  r and computes:
  - r′ = √(β²r² + |x|²)
  - c = βr/r′
  - s = x/r′
  - γ_out = c·γ_in

  It uses a 32-step integer square root followed by three 32-step
  divisions, about 67 clocks in all. If r′ = 0 it outputs c = 1, s = 0, so
  a row that only ever sees zeros is transparent.
* `qr_internal_cell` (row i, column j > i) holds complex r and computes, in
  one clock:
  - x_out = c·x − s·βr
  - r ← conj(s)·x + c·βr

  It passes c and s on to the next column.
* `qr_final_cell` takes the fully rotated reference α and γ, and outputs
  e = γ·α. This is the a-posteriori error y − xᵀw of that training symbol.

**Timing.** All cells move on a common `step`. A step is produced every
`SLOT` = 72 clocks, which is longer than the boundary cell's computation;
an assertion checks that no step arrives while a boundary cell is busy.

`timing_adjust` delays row i by i steps (the usual triangular skew). γ is
delayed one step per diagonal cell. The error for a vector therefore
appears 2P+1 steps after the vector enters row 0.

**Input logic.** `estimator_input_logic` makes the array serve different
S/T-equalizer structures. After a trigger it works in four stages:

1. It captures the unique-word part of the next frame from all elements
   (one sample per symbol).
2. It feeds the array one training symbol per step. Each of the P rows is
   configured as one of:
   - kind 0: unused (zero);
   - kind 1: antenna element n;
   - kind 2: the known unique word delayed by d symbols, which is a
     time-domain tap.

   The reference row always carries the unique word.
3. It waits 2P+2 steps for the array to drain.
4. It pulses `done`.

**Board.** `param_estimator` wraps all of this. Its register port has these
addresses:

| Address | Register |
|---|---|
| `000` | λ (24 fractional bits); β = √λ is computed on write; reset value 0.9 |
| `001` | unique-word length; reset value 31 |
| `1ii` | source of row ii: [1:0] kind, [12:8] element or delay |
| `2ss` | unique-word symbol ss, I part |
| `3ss` | unique-word symbol ss, Q part |

The reset configuration maps rows 0–7 to the eight antennas.

Each trigger clears the array and starts a new, independent estimate; a
trigger that arrives while a run is in progress is ignored. A run takes the
rest of the current frame, then the unique word, then
(31 + 2·23 + 2) × 72 clocks, about 4.6 µs at full speed.

**Reading the weights.** The weights are not divided out in hardware.
Instead, the cell contents can be read through `est_rd_row`/`est_rd_col`:
row < P gives R, and row P gives u. The host then solves R·w = u by
back-substitution. The testbenches show how.

## Files

`rtl/chsim_pkg.sv` holds the shared types, widths, fixed-point helpers and
the sine table. Each module is in `rtl/<name>.sv`, and the top is
`rtl/channel_platform.sv`.

Every module has a self-checking testbench in `tb/`. Each testbench
computes its expected values independently (real arithmetic, reference
LFSRs, back-substitution) and ends by printing
`TB_RESULT checks=… failures=…`.

* `tb_channel_platform` runs the whole platform at reduced size (16 clocks
  per UART bit, 64-symbol frames, 12-row estimator):
  - every element output over a unique word is checked against
    exp(jπ n sin 20°);
  - a DSP frame is read back;
  - with a delayed path, an interferer, noise and fading switched on, it
    checks that the estimator's beam passes the desired direction and
    rejects the interferer;
  - it checks the circular-array and BPSK modes;
  - it counts how often each mechanism occurred.
* `tb_channel_platform_full` runs the top with every parameter at its
  default: full link and frame sizes, P = 23, and one RS232C command at the
  real bit rate. It takes about 30 s in Verilator.
* `tb_workload_st_equalizer` runs estimator experiments on the full-size
  design (only the UART bit time is shortened). It measures the beam
  pattern of the weights computed from the cell contents:
  - 8 elements, desired signal at 20°, interference at 40° and, delayed by
    one symbol, at 60°, Eb/N0 = 20 dB. The beam keeps gain 1 at 20° and has
    nulls below 0.01 at 40° and 60°.
  - 4 elements, desired signal at 20°, copies of it delayed by one and two
    symbols at 5° and 35°, interferer at −40°. With antenna rows only, the
    beam nulls all three. With two extra rows carrying the unique word
    delayed by one and two symbols, it nulls only the interferer: the
    time-domain taps account for the delayed copies, and the beam keeps
    about 0.6 gain toward them.

To run one, for example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/chsim_pkg.sv tb/tb_channel_platform.sv --top-module tb_channel_platform
./obj_dir/Vtb_channel_platform
```

## Departures and limits

* **Path count.** There are five paths (3 + 2) where the original hardware
  has four (2 + 2 or 3 + 1). The extra path allows either split without
  reconfiguring.
* **Time-shared estimator cells.** The estimator cells are time-shared
  sequential logic clocked at the link rate; they are not a separate ASIC.
  A boundary cell takes about 54 ns at 1.248 GHz. Internal cells take one
  clock per step; the original chip needs about 500 ns per internal-cell
  cycle.
* **Own choices.** These are choices of this design, not taken from any
  specification:
  - the unique word, the PN generators and the rectangular symbol pulse;
  - the link framing and lock rules;
  - the UART protocol and register maps;
  - the 8-tap receiver FIR;
  - M ≤ 16 component waves;
  - the table sizes.
* **Circular-array formula.** The circular array uses the phase
  −π/(2 sin(π/N))·cos(θ − 2πn/N). This places adjacent elements half a
  wavelength apart on a circle, keeping a negative sign. Check this against
  your own convention before relying on absolute phases.
* **Fading refresh.** Fading envelopes are refreshed every 16 samples and
  held in between.
* **Not included.** The DSP, the control PCs and the optical converters are
  not part of the RTL. Their connections are top-level ports.
