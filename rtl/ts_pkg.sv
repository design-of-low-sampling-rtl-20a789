// ts_pkg: types, constants and arithmetic helpers shared by the timing
// synchronization blocks.
//
// The sampling phase is counted in steps of 1/PHASE_RES of one sample period;
// 120 degrees (DSSS acquisition) and 90 degrees (OFDM acquisition) are whole
// numbers of steps with the default of 24. Gains are in whole dB, the AGC's
// working unit. Powers are squared magnitudes of correlator outputs.
//
// db10_q4() approximates 10*log10(x) in 1/16 dB from the position of the
// leading one (3.0103 dB per bit, taken as 771/256 dB) and a 16-entry table of
// 16*10*log10(1+m/16) for the four bits below it. db_to_lin() returns
// 16*10^(g/10) from a 10-entry table of 16*10^(r/10), r = g mod 10, multiplied
// by ten for every whole decade of g. Both are this design's own fixed-point
// choices; the algorithm only states the formulas in floating point.
package ts_pkg;

  // ADC word: signed I and Q samples
  localparam int ADC_W = 6;
  // Barker correlator power: (11 * 2^(ADC_W-1))^2 * 2 fits in 19 bits
  localparam int PWR_W = 19;
  // Chips (samples at 1x) per DSSS symbol
  localparam int SPS = 11;
  // 802.11b Barker code, first chip in bit 0; a 1 marks a -1 chip
  localparam logic [10:0] BARKER_NEG = 11'b111_0001_0010;
  // Phase steps per sample period of the sampling clock
  localparam int PHASE_RES = 24;
  localparam int PH_W = 8;            // signed phase command width
  // VGA gain in dB
  localparam int GAIN_W = 6;
  localparam int GAIN_MAX = 63;
  // Linear gain 16*10^(g/10), up to 16*10^6.3
  localparam int LIN_W = 28;

  typedef logic signed [ADC_W-1:0] sample_t;
  typedef logic [PWR_W-1:0]        pwr_t;
  typedef logic signed [PH_W-1:0]  phase_step_t;
  typedef logic [GAIN_W-1:0]       gain_t;
  typedef logic [LIN_W-1:0]        lin_t;

  // PSDU data rate carried in the PLCP header (802.11b/g DSSS/CCK)
  typedef enum logic [1:0] {
    RATE_1M  = 2'd0,
    RATE_2M  = 2'd1,
    RATE_5M5 = 2'd2,
    RATE_11M = 2'd3
  } rate_t;

  // What the AGC measures and how it reacts (AGC state diagram)
  typedef enum logic [2:0] {
    AGC_MAX  = 3'd0,   // gain set to maximum
    AGC_AVG  = 3'd1,   // mean correlator power, before a packet
    AGC_PEAK = 3'd2,   // peak correlator power per symbol
    AGC_FWT  = 3'd3,   // CCK: sum of 4 maximum FWT powers
    AGC_HOLD = 3'd4    // suspended (boundary check, timing acquisition)
  } agc_mode_t;

  // Receiver synchronization states (AGC and timing state diagrams)
  typedef enum logic [3:0] {
    ST_RESET     = 4'd0,   // VGA gain set to maximum
    ST_WAIT_PKT  = 4'd1,   // mean-power AGC, waiting for a packet
    ST_BND1      = 4'd2,   // symbol boundary check before AGC acquisition
    ST_AGC_ACQ   = 4'd3,   // AGC acquisition on peak power
    ST_TACQ      = 4'd4,   // DSSS timing acquisition, AGC suspended
    ST_BND2      = 4'd5,   // symbol boundary check after acquisition
    ST_TRK_PRE   = 4'd6,   // DSSS tracking during the rest of the preamble
    ST_TRK_DSSS  = 4'd7,   // 1/2 Mb/s payload: DSSS tracking
    ST_TRK_CCK   = 4'd8,   // 5.5/11 Mb/s payload: CCK tracking
    ST_OFDM_WAIT = 4'd9,   // OFDM: waiting for frame detection
    ST_OFDM_ACQ  = 4'd10,  // OFDM timing acquisition on short preambles
    ST_OFDM_RUN  = 4'd11   // OFDM: AFC started, timing held
  } sync_state_t;

  // 16*10*log10(1 + m/16), m = 0..15
  localparam logic [5:0] DB_MANT [16] = '{
    6'd0, 6'd4, 6'd8, 6'd12, 6'd16, 6'd19, 6'd22, 6'd25,
    6'd28, 6'd31, 6'd34, 6'd36, 6'd39, 6'd41, 6'd44, 6'd46};

  // 10*log10(x) in 1/16 dB for x >= 1 (0 for x = 0); x up to 64 bits
  function automatic logic [15:0] db10_q4(input logic [63:0] x);
    int unsigned k;
    logic [3:0] m;
    k = 0;
    for (int i = 0; i < 64; i++)
      if (x[i]) k = i;
    // the four bits below the leading one
    m = 4'((x << (63 - k)) >> 59);
    return 16'((k * 771) >> 4) + 16'(DB_MANT[m]);
  endfunction

  // 16*10^(r/10), r = 0..9
  localparam logic [6:0] LIN_MANT [10] = '{
    7'd16, 7'd20, 7'd25, 7'd32, 7'd40, 7'd51, 7'd64, 7'd80, 7'd101, 7'd127};

  // Linear power gain of g dB, times 16
  function automatic lin_t db_to_lin(input gain_t g);
    lin_t v;
    int unsigned dec;
    logic [3:0] rem;
    dec = int'(g) / 10;
    rem = 4'(int'(g) % 10);
    v = lin_t'(LIN_MANT[rem]);
    for (int i = 0; i < 7; i++)
      if (i < dec) v = (v << 3) + (v << 1);
    return v;
  endfunction

endpackage
