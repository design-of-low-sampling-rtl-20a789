// agc: VGA gain control for the DSSS/CCK receiver.
//
// The gain is stepped in the log domain, G' = G - 10*log10(M / D), where M is
// a measured correlator power and D its expected value at the wanted signal
// level. What is measured depends on the receiver state, which the
// controller passes in as mode (the AGC state diagram):
//   AGC_MAX  gain forced to its maximum (start, no knowledge of path loss);
//   AGC_AVG  before a packet: M = mean correlator power over a symbol
//            (the window sum against D_AVG * SPS);
//   AGC_PEAK during acquisition and DSSS tracking: M = the symbol's peak
//            Barker correlator power, against D_PEAK;
//   AGC_FWT  CCK payload: M = sum of 4 maximum FWT powers, against 4 * D_FWT,
//            D_FWT being 95 % of the FWT peak of a clean channel;
//   AGC_HOLD suspended (symbol boundary checks and timing acquisition).
// The formulas and the 95 % follow the algorithm. Updates are made on sym_vld,
// which comes at the end of a select window, so the new gain starts with the
// next window, i.e. on the symbol boundary. The correlator spans 11 samples
// and lags the ADC by two cycles, so the measurement after a change still
// contains samples taken at the old gain; it is discarded (this design's
// choice: without it the loop, which corrects the whole error in one step,
// oscillates). The log is the fixed-point
// approximation of ts_pkg::db10_q4 (1/16 dB), rounded to whole dB; the gain
// range and the target amplitude TARGET_AMP (ADC units per chip) are this
// design's choices.
//
// Interface: mode from the controller; symbol powers from the select window;
// fwt_pwr/fwt_vld from the CCK correlator. gain_db is registered; upd pulses
// with every change of it.
module agc
  import ts_pkg::*;
#(
  parameter int SUM_W      = PWR_W + 4,
  parameter int TARGET_AMP = 12,
  parameter int D_PEAK     = (SPS * TARGET_AMP) ** 2,
  parameter int D_AVG      = (131 * TARGET_AMP * TARGET_AMP) / SPS,
  parameter int D_FWT      = (95 * (8 * TARGET_AMP) ** 2) / 100
) (
  input  logic             clk,
  input  logic             rst_n,
  input  agc_mode_t        mode,
  input  pwr_t             sym_peak,
  input  logic [SUM_W-1:0] sym_sum,
  input  logic             sym_vld,
  input  pwr_t             fwt_pwr,
  input  logic             fwt_vld,
  output gain_t            gain_db,
  output logic             upd
);

  localparam logic [15:0] DB_PEAK = db10_q4(64'(D_PEAK));
  localparam logic [15:0] DB_AVG  = db10_q4(64'(D_AVG * SPS));
  localparam logic [15:0] DB_FWT  = db10_q4(64'(4 * D_FWT));

  logic [PWR_W+1:0] fwt_acc;
  logic [1:0]       fwt_cnt;
  logic             meas_vld;
  logic             skip;      // next measurement straddles a gain change
  logic [63:0]      meas;
  logic [15:0]      db_ref;

  always_comb begin
    meas_vld = 1'b0;
    meas     = '0;
    db_ref   = DB_PEAK;
    unique case (mode)
      AGC_AVG: begin
        meas_vld = sym_vld;
        meas     = 64'(sym_sum);
        db_ref   = DB_AVG;
      end
      AGC_PEAK: begin
        meas_vld = sym_vld;
        meas     = 64'(sym_peak);
        db_ref   = DB_PEAK;
      end
      AGC_FWT: begin
        meas_vld = fwt_vld && (fwt_cnt == 2'd3);
        meas     = 64'(fwt_acc) + 64'(fwt_pwr);
        db_ref   = DB_FWT;
      end
      default: ;
    endcase
  end

  // G' = G - round((dB(M) - dB(D)) / 16), clamped to 0..GAIN_MAX
  logic signed [17:0] delta_q4, delta_db, g_next;
  always_comb begin
    delta_q4 = $signed({2'b0, db10_q4(meas)}) - $signed({2'b0, db_ref});
    delta_db = (delta_q4 + 18'sd8) >>> 4;
    g_next   = $signed({12'b0, gain_db}) - delta_db;
    if (g_next < 0) g_next = '0;
    if (g_next > 18'(GAIN_MAX)) g_next = 18'(GAIN_MAX);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      gain_db <= gain_t'(GAIN_MAX);
      upd     <= 1'b0;
      skip    <= 1'b0;
      fwt_acc <= '0;
      fwt_cnt <= '0;
    end else begin
      upd <= 1'b0;
      if (mode != AGC_FWT) begin
        fwt_acc <= '0;
        fwt_cnt <= '0;
      end else if (fwt_vld) begin
        fwt_cnt <= fwt_cnt + 1'b1;
        fwt_acc <= (fwt_cnt == 2'd3) ? '0 : fwt_acc + (PWR_W+2)'(fwt_pwr);
      end
      if (mode == AGC_MAX) begin
        gain_db <= gain_t'(GAIN_MAX);
        skip    <= 1'b0;
      end else if (meas_vld && skip) begin
        skip    <= 1'b0;
      end else if (meas_vld && gain_t'(g_next) != gain_db) begin
        gain_db <= gain_t'(g_next);
        upd     <= 1'b1;
        skip    <= 1'b1;
      end
    end
  end

endmodule
