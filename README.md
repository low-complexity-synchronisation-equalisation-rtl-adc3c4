# Hiperlan/1 synchro-equaliser: GMSK burst synchronisation, coarse frequency correction and DLMS DFE(6,5)

A Hiperlan/1 receiver gets 23.5 Mb/s GMSK bursts over indoor multipath channels. The
carrier can be off by up to about 104 kHz, which is 1.59 degrees of rotation per symbol.
This RTL is the baseband core that turns those bursts into bits:

1. It picks the stronger of two antennas.
2. It finds the burst timing and measures the carrier offset from the preamble.
3. It removes the offset.
4. It equalises the multipath with a decision feedback equaliser (DFE). The DFE has 6
   feedforward and 5 feedback taps. It adapts with a delayed LMS (DLMS) algorithm driven
   by a *real* error.

The design keeps the hardware small in five ways:

- **One clock at twice the symbol rate (48 MHz).** Real multipliers and adders are
  time-shared between the I and Q halves of each symbol.
- **A correlator made of two real filters.** Because GMSK symbols sit alternately on the I
  and Q axes, a complex correlation needs only two real ±1 filters, not four.
- **No divider or arctangent table.** The phase of a correlation peak is found by counting
  fixed-angle rotations.
- **A pipelined feedforward filter.** This is possible because the LMS update uses the
  error one symbol late (delayed LMS).
- **A feedback filter with no multipliers.** Past decisions are ±1 or ±j, so the feedback
  products are sign flips and I/Q swaps.

## Data path

```
ant_a ─┐
       ├─ antenna_switch ─ r ─┬─ sync_freq_unit ── peak_ts, peak phase, phase step
ant_b ─┘                      │     complex_correlator ─ mag_approx ─ peak_detector
                              │     ─ cordic_phase ─ freq_offset_est
                              └─ freq_corrector (NCO + sincos_lut + cmul_dbl) ─ z
                                                   │
                                  dlms_dfe = dfe_fff ─ dfe_fbf ─ dout / eq_out / eq_err
```

The top module `synchro_equaliser` wires these blocks together. It also derives, for every
decision, which preamble symbol the decision refers to. `clk_phase_gen` supplies the
half-symbol phase `ph`.

## Clocking and number formats

- **Clock.** `clk` runs at 48 MHz. `ph` toggles every clock. Symbol-rate registers load on
  the edges where `ph = 1`, and `sym_en` tells the outside world which edges those are. New
  antenna samples must be presented right after such an edge.
- **Samples.** Samples are 8-bit two's complement Q1.6 (64 = 1.0). `cplx_t` is a packed
  `{re, im}` in `hl1_pkg`.
- **Saturation.** Every multiplier and adder output in the data path saturates to 8 bits.
- **Phases.** Phases are 16-bit binary angles (65536 = one turn), so wrap-around is plain
  modular arithmetic.
- **Coefficients.** Equaliser coefficients are 16-bit Q1.14 accumulators. Their top 8 bits
  drive the multipliers.
- **Input level.** The input is expected near unit amplitude (64). No AGC is included. The
  correlator threshold and the equaliser's decision target (1.0) assume this level.
  - With a main path of 0.75 the correlation peaks reach about 48, against a threshold
    of 32.
  - At 1.5 the Q1.6 format clips.

## The preamble and the two correlation peaks

The high-rate preamble is 450 symbols long (14 × 31 + 16). It starts with the 31-chip
m-sequence m1, sent three times in a row.

- **Chip positions.** Preamble position p lies on the real axis when p is even and on the
  imaginary axis when p is odd.
- **Why only two peaks.** 31 is odd, so the second copy of m1 starts on the other axis and
  does not match the correlator. Only the first and third copies give peaks, at positions 30
  and 92, exactly 62 symbols apart.
- **Pairing.** `sync_freq_unit` pairs a peak with one found 62 ± 1 symbols later. Any peak
  at another distance becomes the new first peak and pulses `pair_rejected`. A spurious
  peak in the header is replaced this way.

**Correlator.** `complex_correlator` holds two transposed real filters:

- an even filter with 16 taps and an odd filter with 15 taps;
- taps 4 clocks (2 symbols) apart;
- a crossbar in front that alternately feeds I and Q.

Each product is rounded, shifted right by 5 and saturated, and so is each adder. The two
outputs are V = E_I + O_Q and W = E_Q − O_I. The correlation of the window ending at
sample n appears two symbols later.

**Peak search.** `mag_approx` computes max(G, 7/8·G + 1/2·L), where G and L are the greater
and lesser of |V| and |W|. `peak_detector` opens an 8-symbol window at the first value above
`THRESH` (32) and keeps the largest value in that window.

**Phase.** `cordic_phase` measures the phase of the peak vector:

1. Fold the vector into 0–45°. The sign bits and the x/y swap are remembered.
2. Rotate it clockwise by atan(1/16) = 3.58° per clock (`x += y>>4; y -= x>>4`) until y ≤ 0.
3. After n rotations, report (n − ½) × 3.58°, unfolded back to the full circle.

Up to 13 rotations are allowed, because 12 steps of 3.58° cover only 42.9°. The worst-case
error is about ±1.8°. A finer step is available with `SHIFT = 5`, `MAXIT = 26` and
`STEP = 326` (1.79° per rotation). With the same 4 guard bits, that setting is accurate only
for vectors of length 80 or more.

**Frequency estimate.** `freq_offset_est` takes the wrapped difference of the two peak
phases and divides it by 62. The division is a multiply by 1057 followed by a rounded shift
right by 16. At the largest offset the phase turns by ±98.6° in 62 symbols, so the wrap is
never ambiguous.

## Derotation and the training interface

`freq_corrector` is an NCO, the table `sincos_lut` and a double-frequency complex
multiplier (`cmul_dbl`).

- **Table.** `sincos_lut` is a 65-entry quarter-wave table, 256 points per turn, computed
  at elaboration.
- **Start phase.** The NCO starts at the phase measured at the second peak, referred back
  to the middle chip of m1 (15 samples before the peak). The main path therefore reaches the
  equaliser on the real axis.
- **Latency.** z(n) appears three symbols after r(n).

The equaliser's decision in symbol t refers to the antenna sample t − 8 − CURSOR:

- 3 symbols through the derotator;
- 5 through the feedforward filter (input register plus its 4-symbol pipeline);
- CURSOR = 3 for the cursor tap.

From the second peak (preamble position 92) the top computes `train_pos`, the preamble
position of the symbol being decided.

- **Axis.** `train_pos[0]` gives the GMSK axis.
- **Training.** While `train_pos < 450`, `train_req` is high. The user must then drive
  `train_sym` with the known preamble symbol at that position. The preamble content comes
  from the standard and is not built in.
- **Data.** After the preamble the equaliser runs decision-directed. It delivers one bit per
  symbol on `dout` with `dout_valid`.

## The equaliser

`dfe_fff` is the feedforward filter:

- six `cmul_dbl` taps, each with 2 symbols of latency;
- a registered pair-adder stage and a registered final adder.

So f(t) = Σ cᵢ·x(t−5−i), where x(t) is the input present during symbol t. The error of f(t)
is registered and used one symbol later:

cᵢ += 2⁻⁶ · e · conj(x(t−5−i))

Here e is the real error placed on the symbol's axis. The cursor tap (index 3) starts at
1.0.

`dfe_fbf` is the feedback section and works within one symbol:

1. y = f + P1, where P1 is the first partial sum of a transposed 5-tap filter.
2. The decision is the sign of Re y or Im y, or the training symbol.
3. The error is the real value ε = ±64 − (Re or Im of y).
4. The partial sums reload as P_j ← P_{j+1} + b_j·d(t). The products b_j·d(t) are
   multiplexers, because d is ±1 or ±j.

The feedback coefficients also update one symbol after their error.

**Real error.** A real error only constrains the axis that carries the symbol. The
equalised constellation therefore settles to two levels on each axis, not to four fixed
points.

## Antenna diversity

`antenna_switch` does power-based switched diversity. After `rx_start` it adds up |I| + |Q|
of both antennas over 16 symbols. It then switches to antenna B if B's sum is larger. With
`div_en = 0` it stays on antenna A.

## Where this RTL departs from or adds to the source design

The structure follows the published WINHOME synchro-equaliser:

- the two-filter correlator with a 5-bit shift and 8-bit adders;
- the four-region magnitude;
- the 8-symbol peak window;
- fixed-step phase rotation with a shift of 4;
- use of the first and third m1 only, 62 symbols apart;
- DFE(6,5) with a pipelined feedforward filter of double-frequency complex multipliers
  (4-symbol pipeline);
- a transposed feedback filter with no latency;
- a real-error delayed-LMS update;
- power-based switched diversity.

Everything else is this design's own choice:

- the Q formats, step sizes (2⁻⁶) and coefficient widths;
- the threshold value 32 and the pairing tolerance;
- the antenna measurement window;
- the NCO start-phase alignment;
- the training interface and all latency bookkeeping;
- the default m1, which is a 31-chip m-sequence from x⁵ + x² + 1, chip k in bit k. Pass
  the standard's m1 through the `M1` parameter.

The correlator rounds its products before the 5-bit shift. Plain truncation biased the peak
phases enough to spoil the frequency estimate.

Not built:

- DFE-internal dual-antenna combining (only named in the source);
- the MAC, FEC, interleaver, modulator and RF/ADC parts of the modem.

## Limitations

- **Residual frequency error.** The real-error LMS cannot follow a steady phase rotation
  well, so the coarse estimate has to be close. With 400 data symbols, a residual of 15
  units (0.08°) per symbol was tolerated in simulation. Longer bursts need a smaller
  residual: an earlier run with about 8 units caused decision errors over 800 symbols.
- **Peak phase bias.** The 5-bit product shift in the correlator quantises small sample
  components. This biases the measured peak phase by a few degrees. The frequency estimate
  is not affected much (both peaks share the bias), and the equaliser absorbs a fixed phase.
- **Input level.** It must be controlled outside this core (see above).
- **Statistical performance not re-measured.** The bit-level design has not been run over
  channel ensembles (packet error rate against Eb/No). The testbenches use fixed channels.

## Files and simulation

`rtl/` holds one module or package per file. `hl1_pkg.sv` must be compiled first. Each block
has a self-checking testbench `tb/tb_<block>.sv`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_synchro_equaliser` | Runs the top at its default parameters through four bursts, each with header, preamble and 400 data symbols, over a 3-path channel with noise. The offsets are +60 kHz, −90 kHz, +104 kHz and −104 kHz. Diversity is off in one burst, and antenna B is chosen in two. Checks peak timing, the frequency estimate, the antenna choice, error-free data after training, and that the main path stays on the cursor tap. It counts every mechanism: peaks, synchronisations, antenna switch, and the change from training to decision-directed mode. |
| `tb_dfe_fff`, `tb_dfe_fbf` | Compare outputs and every coefficient update bit-exactly with a reference model, and check convergence. |
| `tb_dlms_dfe` | A channel with pre- and post-cursor echoes and a 25° phase, with 450 training symbols followed by decision-directed mode. |
| `tb_sync_freq_unit` | Five bursts at offsets up to ±290 units per symbol, some with spurious header peaks. |
| Other unit testbenches | Compare against arithmetic models: exact products, correlations, magnitudes, phases and table values. |

Example with plain Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_synchro_equaliser \
    -y rtl -y tb rtl/hl1_pkg.sv tb/tb_synchro_equaliser.sv
./obj_dir/Vtb_synchro_equaliser
```

Generic synthesis of the top gives roughly 2200 cells and 2500 flip-flop bits. It has no
memories; the sine table is combinational logic.
