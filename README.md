# Low-sampling-rate timing synchronization for 802.11b/g and 802.11a/g

A WLAN baseband usually samples at two or more times the chip rate, then
interpolates to the right instant. This design samples **once per chip**
(or once per OFDM sample). It gets the timing right by moving the sampling
clock itself. An all-digital DLL (ADDLL) outside this block shifts the ADC
clock phase on command. The logic here watches correlator power and sends
those commands. The loop is:

    ADC  ->  correlators  ->  timing synchronization  ->  ADDLL  ->  ADC clock phase

All sampling-phase decisions therefore use power measured at the phases the
ADC actually used. No extra samples are ever taken. Searching for the right
phase means spending symbols: sample, measure, move, sample again. The
algorithms below do that search within the preamble, and then hold the
phase against clock drift for the rest of the packet.

The top module is `timing_sync_top`, which has no parameters. The ADC, the
VGA (variable-gain amplifier) and the ADDLL are not part of the RTL: the
top takes ADC samples in and gives out a gain in dB and phase moves.

## Units and conventions

* **Phase** is counted in steps of 1/24 of a sample period
  (`PHASE_RES = 24`). Useful angles are then whole numbers of steps:
  120° = 8, 90° = 6, 60° = 4, 30° = 2. `ph_step` is a signed move. The
  ADDLL applies it from the next sample on, and the moves add up.
* **Samples** are 6-bit signed I and Q.
* **Correlator power** is I² + Q² of the 11-chip Barker correlation
  (19 bits).
* **Gain** is in whole dB, 0 to 63. It resets to 63.
* **Symbol boundary** is a chip position 0 to 10. It says which of the 11
  correlator outputs of a symbol period carries the correlation peak.
* The clock is the sample clock, or faster. `adc_vld` marks a sample, and
  every block advances only on valid samples.

## How a DSSS/CCK packet is received

`sync_ctrl` steps through the following states. Its state is visible on
the `state` port.

| State | What happens | AGC |
|---|---|---|
| `ST_RESET` | gain set to maximum | max |
| `ST_WAIT_PKT` | packet detector watches for Barker peaks | mean power |
| `ST_BND1` | first symbol-boundary check (4 symbols) | hold |
| `ST_AGC_ACQ` | gain converges on the preamble (8 symbols) | peak power |
| `ST_TACQ` | timing acquisition (20 symbols) | hold |
| `ST_BND2` | second boundary check: the phase moves may have shifted the peak by a chip | hold |
| `ST_TRK_PRE` | DSSS tracking for the rest of the preamble and header | peak power |
| `ST_TRK_DSSS` / `ST_TRK_CCK` | payload tracking: Barker-based at 1 and 2 Mb/s, FWT-based at 5.5 and 11 Mb/s | peak / FWT |

`preamble_end`, together with `rate`, switches from the preamble state to
one of the payload states. `packet_end` returns to `ST_RESET` from any
state.

### The select window

The correlator produces one power per chip. Per symbol, `symbol_window`
keeps 11 chips' worth of them, but not all: only the 4 before the boundary
chip, the boundary chip itself, and the 6 after it. This throws away the
chips far from the peak, which carry mostly multipath and noise. The window
gives two numbers per symbol:

* `sym_sum`, the sum of the window. Acquisition and the mean-power AGC use
  it.
* `sym_peak`, the maximum in the window. Tracking, the peak-power AGC and
  packet detection use it.

### Timing acquisition at 1x (`dsss_acq`)

This is the least obvious part. With a triangular chip pulse, the power
seen at sampling offset *x* from the optimum falls off roughly as
(1 − |x|)². Three phases 120° apart therefore always contain one within
60° of the optimum. The procedure is:

1. Measure the power at the current phase, then at +120°, then at +240°.
   Each measurement is the window sum over 4 symbols, after one settling
   symbol.
2. Name the best of the three **B** and the second best **N**. The optimum
   lies between B and N, nearer B.
3. Move to **M**, 60° from B toward N, and measure there.
4. Form three slopes:
   * slope₁ = P(B) − P(M)
   * slope₂ = P(M) − P(N)
   * slope₃ = P(B) − P(N)
5. Decide:
   * If slope₁ ≤ 0 and slope₂ ≥ 0, M is at least as good as B and better
     than N, so M is in the optimum range and the phase stays at M. If in
     addition slope₃ > 0, the optimum leans toward B and the phase moves a
     further 30° toward B.
   * Otherwise M was a worse guess than B, and the phase returns to B.

Acquisition takes 20 symbols and at most four moves. The final error is
within ±30° (±2 steps) in the noiseless case. `acq_in_range` reports which
branch was taken.

### Tracking (`dsss_track`, `cck_track`)

The tracker keeps a **reference**: the mean of the first 32 symbol peaks
after acquisition. It is collected once and then frozen. It also keeps a
**current** value, the running mean of the latest 16 peaks. Every 4
symbols it evaluates

    e = current − reference

When e < 0, power has dropped below what the phase had right after
acquisition, and the phase is moved by 2 steps (30°). The comparison is
made without a divider, as cur·32 < ref·16.

Power has no sign, so it cannot tell which way the optimum lies. The
tracker climbs the hill instead. It keeps moving in the same direction
unless the 8 symbols after its last move were weaker than the 8 before it,
in which case it turns round. So that both blocks of 8 lie at one phase,
the check right after a move never moves. The tracker can therefore follow
at most 2 steps per 8 symbols.

The per-symbol power varies a lot with noise and, for CCK, with the data.
With 4-symbol blocks or 1-step moves, a move changed the power by less
than that noise. The tracker then turned the wrong way often enough to
wander off by a whole chip over a long packet.

**Steady-speed moves while the reference is collected.** No check is made
during the 32 reference symbols, so drift in that time goes uncorrected.
`dsss_track` can move the phase at a fixed speed meanwhile. The speed is
the signed input `ref_slew` (`trk_ref_slew` at the top), in 1/256 step per
symbol. It is added to an accumulator every symbol. Each time the
accumulator passes ±256, the phase moves by one step. The value 0 turns
this off. For example, 400 ppm at 11 chips per symbol is about 27. Where
the speed comes from is left to the system, for example a known crystal
tolerance or the drift seen in an earlier packet.

**AGC interaction.** A falling correlator power makes the AGC raise the
gain, which would hide the timing error from the tracker. So every peak is
normalised by its own symbol's gain as it enters the sums: it is multiplied
by 10^((63 − G)/10), taken from a small table. The sums then compare like
with like even when the gain changed inside a window.

`cck_track` is the same machine with these differences:

* The tracked quantity is the largest codeword power of `cck_fwt`.
* The reference is 16 symbols and the current value 8.
* The reference is scaled by 0.9. CCK powers vary more from symbol to
  symbol, and without this margin the tracker moves too often.

`cck_fwt` correlates each 8-chip symbol with all 64 codewords of the
11 Mb/s CCK set (φ2, φ3, φ4; φ1 drops out of the power). It does this as
two 4-chip partial sums that are combined under the four φ4 rotations. Its
output is the maximum |.|².

### AGC (`agc`)

The gain update is G' = G − round(10·log10(M/D)). M is a measured power and
D is the power expected at the target level, which is 12 ADC units per
chip. What M is depends on the state:

* mean power over the window before a packet;
* the symbol's peak during acquisition and DSSS tracking;
* the sum of 4 FWT maxima during CCK payloads, against 4 × 95 % of a
  clean-channel FWT peak.

The logarithm is fixed point: the position of the leading one gives
3.01 dB per bit, and a 16-entry table supplies the fraction. Updates happen
when a window closes, so a new gain starts at a symbol boundary.

The correlator spans 11 samples, so the measurement right after a change
still mixes old-gain samples. That measurement is skipped. Without the
skip, the one-step loop oscillates by several dB.

### Packet detection and boundary check

These two are plain choices of this design.

* **Packet detection** (`packet_detect`): a symbol counts as a hit when its
  window peak exceeds 4 times the mean of its window and a fixed floor.
  Three hits in a row detect a packet.
* **Boundary check** (`symbol_boundary`): accumulates the power of each of
  the 11 chip positions over 4 symbols and takes the largest.

## OFDM acquisition (`ofdm_acq`)

An 802.11a/g packet starts with ten 16-sample short preambles. There is no
time for a long search, and the AFC (frequency correction, outside this
design) needs two of them. The steps are:

1. Frame detection (outside this design) raises `frame_start` with the
   first sample.
2. For each of four preambles, the block computes
   C = Σ S_k · conj(R_k) and E = Σ |R_k|², where S is the short training
   sequence and R the received samples. It moves the phase by 90° before
   each of the next three.
3. The normalised power is P = |C| / √E. The four values are compared as
   |C_i|²·E_best > |C_best|²·E_i, which needs no division or root.
4. After the fourth preamble the phase is corrected by (best − 3) × 90°.
5. Two more preambles are let pass at the corrected phase, so that the AFC
   sees two good preambles. Then `afc_start` pulses.

The remaining error is at most 45° (3 steps). The stored sequence S is the
802.11a short training symbol scaled by 800 and rounded to 8 bits.

## Top-level interface

| Port | Dir | Meaning |
|---|---|---|
| `adc_vld`, `adc_i`, `adc_q` | in | ADC samples, 6-bit signed |
| `ofdm_mode` | in | next packet is 802.11a/g |
| `frame_start` | in | OFDM frame detection, asserted with the first short-preamble sample (or in the cycle before it while `adc_vld` is low) |
| `preamble_end`, `rate` | in | DSSS: first payload chip, and the rate taken from the PLCP header |
| `packet_end` | in | back to the reset state |
| `trk_ref_slew` | in | DSSS: steady phase speed while the tracking reference is collected, 1/256 step per symbol, signed; 0 turns it off |
| `ph_step`, `ph_vld` | out | phase move for the ADDLL, in 1/24 sample |
| `vga_gain_db`, `vga_upd` | out | VGA gain in dB, and a pulse on each change |
| `afc_start` | out | OFDM: the AFC may start |
| `state`, `boundary`, `pkt_det`, `acq_in_range`, `ofdm_best_idx`, `trk_chk`, `trk_err_neg`, `trk_ref_ready`, `sync_busy`, `ofdm_acq_done` | out | status |

Reset (`rst_n`) is synchronous and active low.

## Files

The reusable parts are:

* `rtl/ts_pkg.sv`: widths, enums, and the dB/linear helper functions.
* `rtl/run_sum_fifo.sv`: the running-sum FIFO. It adds the new value and
  subtracts the oldest, so a sum of N needs one adder rather than an N-input
  tree.

Each other module in `rtl/` is one of the blocks above. Each has a
self-checking testbench `tb/tb_<module>.sv`.

## Simulating

With verilator 5, for example for the end-to-end test:

    verilator --binary --timing --assert -Irtl -Itb rtl/ts_pkg.sv \
        tb/tb_timing_sync_top.sv --top-module tb_timing_sync_top
    ./obj_dir/Vtb_timing_sync_top

Every testbench ends with `TB_RESULT checks=N failures=M`.

`tb_timing_sync_top` closes the whole loop. Behavioural models stand in
for the transmitter, channel, VGA, ADC and ADDLL:

* chips with a triangular pulse, sampled at the commanded phase;
* a fixed carrier rotation and 20 dB SNR;
* a path loss that the AGC must undo;
* a sampling clock running 400 ppm fast.

It receives three packets at default parameters, in about 15 seconds of
simulation:

1. DSSS with an 11 Mb/s CCK payload, with `trk_ref_slew` matched to the
   drift (27);
2. DSSS with a 2 Mb/s payload, with no slew;
3. OFDM.

It checks:

* while tracking, the phase never slips by half a chip (more than 11.5
  steps), and its RMS error over the preamble and over the payload stays
  within 6 steps (90°);
* OFDM acquisition ends within 3 steps;
* `afc_start` comes once per OFDM packet.

It also counts every mechanism and fails if one never happened. The
mechanisms are detection, both boundary checks, all three AGC modes, the
acquisition and its moves, steady-speed moves, DSSS and CCK tracking moves, error detections,
both payload switches, and the OFDM moves and AFC start.

`tb_workloads` uses the same models for longer runs. Each run is one
packet:

* 2 Mb/s with 4000 payload symbols (a 1000-byte payload) at +50, −50,
  +400 and −400 ppm;
* 11 Mb/s with 1000 payload symbols at the same four drifts;
* OFDM acquisition at ±400 and ±800 ppm, each from three start phases.

The DSSS and CCK runs use the same limits as the end-to-end test. With the
default seed, the worst RMS error is 5.5 steps (2 Mb/s preamble at
+400 ppm) and the worst single error is 9.6 steps. OFDM acquisition must
end within 3 steps plus the drift over 160 samples. The worst case is 4.1
steps at 800 ppm, against a limit of 6.1.

## Departures from the original algorithm, and limits

* **Phase resolution** is 24 steps per sample. The original works with 22,
  which cannot express 120° and 90° exactly.
* **Gain normalisation** is applied per symbol on entry. The original
  divides each sum by the current gain. The two agree when the gain is
  constant.
* **Tracking** uses a frozen reference. The original text also describes a
  sliding 32-symbol sum, which is not used here. It also moves the phase at
  a steady speed while the reference is collected, but does not say where
  the speed comes from. Here it is the `trk_ref_slew` input.

  A slew matched to the drift did not help in closed loop. The reference
  is then taken at the power peak, and the tracker moves more often trying
  to reach it. In `tb_workloads`, a 2 Mb/s packet at −400 ppm reached 6.9
  steps RMS with the slew, against 0.9 without it (default seed). `tb_workloads`
  therefore runs with no slew.

  Without the slew, drift during the 32 + 16 symbols before the first check is
  not corrected, and it stays in the reference. At 400 ppm this is about
  5 steps. It accounts for the largest errors in `tb_workloads`: 5.5 steps
  RMS over the 2 Mb/s preamble at +400 ppm. At 50 ppm, which the original
  evaluation uses for its error-rate curves, the drift is eight times
  smaller.
* **The move direction** in tracking (hill climbing over 8-symbol blocks),
  the 2-step move size, and the 30° fine move in acquisition are choices
  of this design. The
  original leaves them open.
* **5.5/11 Mb/s payloads** use the FWT-based tracker. One passage of the
  original says the OFDM tracking applies there, but its section on CCK and
  its AGC state diagram both describe the FWT tracker.
* **Packet detection, the boundary check, frame detection and PLCP header
  decoding** come from earlier work or lie outside the original design.
  The first two are simple versions here; the last two are inputs.
* **OFDM** has only acquisition. Tracking in OFDM is done by the AFC,
  which is not part of this design, so tolerance to drift over a long OFDM
  packet is not a property of this RTL.
* The **ADDLL, ADC and VGA** are not included. Their behaviour is modelled
  only in the end-to-end testbench.
