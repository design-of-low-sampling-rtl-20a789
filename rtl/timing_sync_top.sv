// timing_sync_top: low-sampling-rate timing synchronization for an
// 802.11b/g (DSSS/CCK) and 802.11a/g (OFDM) baseband receiver.
//
// The ADC samples once per chip (DSSS/CCK) or once per sample (OFDM) on a
// clock whose phase is set by an all-digital DLL (ADDLL). Instead of
// interpolating between oversampled values, this block measures correlator
// power and commands the ADDLL to move the sampling phase (dynamic
// sampling): ADC -> PN correlator -> timing synchronization -> ADDLL -> ADC.
//
// Inside: the 16-element sample shift register shared by all units; the
// Barker correlator with its select window, packet detector and symbol
// boundary check; the 1x DSSS acquisition; DSSS tracking on Barker peak
// power; CCK tracking on the maximum FWT power; OFDM acquisition on the short
// preambles; the AGC; and the controller that sequences them. The ADC, the
// VGA and the ADDLL are outside: adc_* come in, vga_gain_db and
// ph_step/ph_vld go out.
//
// Interface and timing:
//   adc_vld/adc_i/adc_q  one sample per chip (or OFDM sample), any rate up to
//                        one per clock;
//   ofdm_mode            selects the 802.11a/g path (held for a packet);
//   frame_start          OFDM: asserted with adc_vld of the first sample of
//                        the first short preamble (frame detection);
//   preamble_end, rate   DSSS: PSDU rate from the PLCP header, asserted with
//                        adc_vld of the first payload chip;
//   packet_end           returns the receiver to its reset state;
//   trk_ref_slew         DSSS: steady phase speed while the tracking
//                        reference is collected, 1/256 step per symbol
//                        (0: none);
//   ph_step/ph_vld       signed phase move in 1/PHASE_RES of a sample period,
//                        to be applied by the ADDLL from the next sample on;
//   vga_gain_db          VGA gain in dB, changed at select-window edges;
//   afc_start            OFDM: frequency estimation may start;
//   status               state, boundary, pkt_det, acq_in_range,
//                        ofdm_best_idx; trk_chk/trk_err_neg pulse with each
//                        tracking check and its e < 0 result; trk_ref_ready
//                        once the tracking reference is collected; vga_upd
//                        with each gain change; sync_busy while a boundary
//                        check or an acquisition runs; ofdm_acq_done with
//                        the final OFDM phase correction.
module timing_sync_top
  import ts_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adc_vld,
  input  sample_t     adc_i,
  input  sample_t     adc_q,
  input  logic        ofdm_mode,
  input  logic        frame_start,
  input  logic        preamble_end,
  input  rate_t       rate,
  input  logic        packet_end,
  input  logic signed [7:0] trk_ref_slew,
  output phase_step_t ph_step,
  output logic        ph_vld,
  output gain_t       vga_gain_db,
  output logic        afc_start,
  output sync_state_t state,
  output logic [3:0]  boundary,
  output logic        pkt_det,
  output logic        acq_in_range,
  output logic [1:0]  ofdm_best_idx,
  output logic        trk_chk,
  output logic        trk_err_neg,
  output logic        trk_ref_ready,
  output logic        vga_upd,
  output logic        sync_busy,
  output logic        ofdm_acq_done
);

  localparam int SUM_W = PWR_W + 4;

  // shared sample shift register
  sample_t taps_i [16], taps_q [16];
  logic    tap_vld;

  sample_shift_reg #(.DEPTH(16)) u_sr (
    .clk, .rst_n, .in_vld(adc_vld), .in_i(adc_i), .in_q(adc_q),
    .taps_i, .taps_q);

  always_ff @(posedge clk) begin
    if (!rst_n) tap_vld <= 1'b0;
    else        tap_vld <= adc_vld;
  end

  sample_t bk_i [SPS], bk_q [SPS], ck_i [8], ck_q [8];
  always_comb begin
    for (int n = 0; n < SPS; n++) begin
      bk_i[n] = taps_i[n];
      bk_q[n] = taps_q[n];
    end
    for (int n = 0; n < 8; n++) begin
      ck_i[n] = taps_i[n];
      ck_q[n] = taps_q[n];
    end
  end

  // Barker correlator and select window
  pwr_t pwr;
  logic pwr_vld;
  barker_correlator u_corr (
    .clk, .rst_n, .tap_vld, .taps_i(bk_i), .taps_q(bk_q), .pwr, .pwr_vld);

  logic [3:0]       chip_idx;
  pwr_t             sym_peak;
  logic [SUM_W-1:0] sym_sum;
  logic             sym_vld;
  symbol_window #(.SUM_W(SUM_W)) u_win (
    .clk, .rst_n, .pwr, .pwr_vld, .boundary, .chip_idx,
    .sym_peak, .sym_sum, .sym_vld);

  // controller outputs
  agc_mode_t agc_mode;
  logic pkt_en, bnd_start, acq_start, dtrk_start, dtrk_en;
  logic cck_start, ctrk_en, ofdm_start;

  packet_detect #(.SUM_W(SUM_W)) u_pd (
    .clk, .rst_n, .en(pkt_en), .sym_peak, .sym_sum, .sym_vld, .det(pkt_det));

  logic bnd_busy, bnd_done;
  symbol_boundary u_bnd (
    .clk, .rst_n, .start(bnd_start), .pwr, .pwr_vld, .chip_idx,
    .boundary, .busy(bnd_busy), .done(bnd_done));

  // DSSS acquisition and tracking
  phase_step_t acq_step, dtrk_step, ctrk_step, ofdm_step;
  logic acq_vld, acq_busy, acq_done, dtrk_vld, ctrk_vld, ofdm_vld;
  dsss_acq #(.SUM_W(SUM_W)) u_acq (
    .clk, .rst_n, .start(acq_start), .sym_sum, .sym_vld,
    .ph_step(acq_step), .ph_vld(acq_vld), .busy(acq_busy), .done(acq_done),
    .in_range(acq_in_range));

  logic dtrk_ref, dtrk_chk, dtrk_neg;
  dsss_track u_dtrk (
    .clk, .rst_n, .start(dtrk_start), .en(dtrk_en), .sym_peak, .sym_vld,
    .gain_db(vga_gain_db), .ref_slew(trk_ref_slew), .ph_step(dtrk_step),
    .ph_vld(dtrk_vld), .ref_ready(dtrk_ref), .chk_vld(dtrk_chk), .err_neg(dtrk_neg));

  // CCK
  pwr_t fwt_pwr;
  logic fwt_vld;
  cck_fwt u_fwt (
    .clk, .rst_n, .start(cck_start), .tap_vld, .taps_i(ck_i), .taps_q(ck_q),
    .fwt_pwr, .fwt_vld);

  logic ctrk_ref, ctrk_chk, ctrk_neg;
  cck_track u_ctrk (
    .clk, .rst_n, .start(cck_start), .en(ctrk_en), .fwt_pwr, .fwt_vld,
    .gain_db(vga_gain_db), .ph_step(ctrk_step), .ph_vld(ctrk_vld),
    .ref_ready(ctrk_ref), .chk_vld(ctrk_chk), .err_neg(ctrk_neg));

  // AGC
  logic agc_upd;
  agc #(.SUM_W(SUM_W)) u_agc (
    .clk, .rst_n, .mode(agc_mode), .sym_peak, .sym_sum, .sym_vld,
    .fwt_pwr, .fwt_vld, .gain_db(vga_gain_db), .upd(agc_upd));

  // OFDM acquisition
  logic ofdm_busy, ofdm_done;
  ofdm_acq u_ofdm (
    .clk, .rst_n, .start(ofdm_start), .in_vld(adc_vld), .in_i(adc_i),
    .in_q(adc_q), .ph_step(ofdm_step), .ph_vld(ofdm_vld),
    .best_idx(ofdm_best_idx), .busy(ofdm_busy), .done(ofdm_done),
    .afc_start);

  sync_ctrl u_ctrl (
    .clk, .rst_n, .ofdm_mode, .frame_start, .preamble_end, .rate, .packet_end,
    .sym_vld, .pkt_det, .bnd_done, .acq_done, .ofdm_afc_start(afc_start),
    .acq_step, .acq_vld, .dtrk_step, .dtrk_vld, .ctrk_step, .ctrk_vld,
    .ofdm_step, .ofdm_vld, .state, .agc_mode, .pkt_en, .bnd_start,
    .acq_start, .dtrk_start, .dtrk_en, .cck_start, .ctrk_en, .ofdm_start,
    .ph_step, .ph_vld);

  assign trk_chk     = dtrk_chk | ctrk_chk;
  assign trk_err_neg = (dtrk_chk & dtrk_neg) | (ctrk_chk & ctrk_neg);
  assign trk_ref_ready = dtrk_ref | ctrk_ref;
  assign vga_upd       = agc_upd;
  assign sync_busy     = bnd_busy | acq_busy | ofdm_busy;
  assign ofdm_acq_done = ofdm_done;

endmodule
