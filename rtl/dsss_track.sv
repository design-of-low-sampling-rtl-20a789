// dsss_track: timing tracking for DSSS (DBPSK/DQPSK) symbols.
//
// Sampling clock offset makes the sampling phase drift away from the optimum
// found by acquisition, and the per-symbol Barker peak power then drops. The
// tracker compares a short-term mean of the peak power with a reference,
// both divided by the VGA gain (gain normalisation keeps an AGC gain increase
// from hiding a power loss):
//   e = S_cur / (CUR_LEN * G) - S_ref / (REF_LEN * G)
// S_ref is the sum of the first REF_LEN = 32 symbol peaks after start, S_cur
// the running sum of the latest CUR_LEN = 16 peaks, and e is tested every
// CHECK = 4 symbols; these numbers and the running sums built from FIFOs
// with three-input adders (run_sum_fifo) follow the algorithm.
// Departure: the algorithm divides each sum by the gain in force when it is
// evaluated. Here every peak is normalised on entry, multiplied by
// 16*10^((GAIN_MAX-G)/10) with G the gain of its own symbol, so that AGC
// steps inside a 16- or 32-symbol window (the AGC adjusts the gain every
// symbol) do not show up as timing errors. With a constant gain the two are
// the same. The sign test then needs no divider:
//   e < 0  <=>  S_cur * REF_LEN < S_ref * CUR_LEN.
//
// When e < 0 the phase is moved by STEP. The algorithm does not say in which
// direction; this design climbs the power hill: it keeps the direction of
// the previous move unless the gain-normalised power of the 2*CHECK symbols
// since that move is below that of the 2*CHECK symbols before it, in which
// case it turns round. To have 2*CHECK symbols at one phase on each side,
// the check right after a move never moves. e >= 0 leaves the phase alone.
// STEP = 2 (30 degrees) and the 8-symbol judgement are this design's
// choices: with 1-step moves or 4-symbol blocks the power change was no
// larger than the noise, and wrong turns let the phase walk off by a chip.
// The tracker can follow 2 steps per 8 symbols.
//
// While the reference is collected no check is made, so a drifting clock
// would carry the phase away unnoticed. Following the algorithm, the phase
// is then moved at a steady speed: ref_slew, in 1/256 step per symbol, is
// added to an accumulator every symbol, and each time the accumulator
// passes +-256 a 1-step move is made. The algorithm does not say where the
// speed comes from; here it is an input (e.g. the known crystal tolerance,
// or the rate seen in an earlier packet), and 0 disables it. 400 ppm at 11
// chips per symbol is about 27.
//
// Interface: start (one cycle) clears the sums and begins reference
// collection; en keeps the tracker running (low: no checks, no moves);
// sym_peak/sym_vld from the select window; gain_db from the AGC. Moves leave
// as ph_step/ph_vld (one cycle); ref_slew is read on every symbol before
// ref_ready; ref_ready is high once the reference is
// taken; chk_vld pulses on every check, with err_neg its outcome.
module dsss_track
  import ts_pkg::*;
#(
  parameter int REF_LEN = 32,
  parameter int CUR_LEN = 16,
  parameter int CHECK   = 4,
  parameter int STEP    = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        en,
  input  pwr_t        sym_peak,
  input  logic        sym_vld,
  input  gain_t       gain_db,
  input  logic signed [7:0] ref_slew,
  output phase_step_t ph_step,
  output logic        ph_vld,
  output logic        ref_ready,
  output logic        chk_vld,
  output logic        err_neg
);

  // gain-normalised power: measured power times 16*10^((GAIN_MAX-G)/10)
  localparam int NW   = PWR_W + LIN_W;
  localparam int RS_W = NW + $clog2(REF_LEN);
  localparam int CS_W = NW + $clog2(CUR_LEN);
  localparam int PW   = RS_W + 8;

  logic [RS_W-1:0] ref_run, ref_sum;
  logic [CS_W-1:0] cur_sum;
  logic            ref_full, cur_full;
  logic [NW-1:0]   p_norm;
  logic [7:0]      chk_cnt;
  logic            eval;
  logic [PW-1:0]   lhs, rhs;
  localparam int BS_W = NW + $clog2(2 * CHECK + 1);
  logic [BS_W-1:0] blk_sum, blk_prev;
  logic            blk_full, worse;
  logic            moved_prev;
  logic            dir_up;
  logic            hold;       // check right after a move: no move
  logic signed [9:0] slew_acc;  // steady-speed phase, 1/256 step

  run_sum_fifo #(.LEN(REF_LEN), .W(NW)) u_fifo2 (
    .clk, .rst_n, .clear(start), .push(sym_vld && en && !ref_ready),
    .din(p_norm), .sum(ref_run), .full(ref_full));

  run_sum_fifo #(.LEN(CUR_LEN), .W(NW)) u_fifo1 (
    .clk, .rst_n, .clear(start), .push(sym_vld && en),
    .din(p_norm), .sum(cur_sum), .full(cur_full));

  // power of the latest 2*CHECK symbols, to judge the previous move
  run_sum_fifo #(.LEN(2 * CHECK), .W(NW), .SUM_W(BS_W)) u_blk (
    .clk, .rst_n, .clear(start), .push(sym_vld && en),
    .din(p_norm), .sum(blk_sum), .full(blk_full));

  assign p_norm = NW'(sym_peak) * NW'(db_to_lin(gain_t'(GAIN_MAX) - gain_db));
  assign worse  = blk_sum < blk_prev;
  assign lhs    = PW'(cur_sum) * PW'(REF_LEN);
  assign rhs    = PW'(ref_sum) * PW'(CUR_LEN);


  always_ff @(posedge clk) begin
    if (!rst_n || start) begin
      ref_sum      <= '0;
      ref_ready    <= 1'b0;
      chk_cnt      <= '0;
      eval         <= 1'b0;
      ph_step      <= '0;
      ph_vld       <= 1'b0;
      chk_vld      <= 1'b0;
      err_neg      <= 1'b0;
      blk_prev     <= '0;
      moved_prev   <= 1'b0;
      dir_up       <= 1'b1;
      hold         <= 1'b0;
      slew_acc     <= '0;
    end else begin
      ph_vld  <= 1'b0;
      chk_vld <= 1'b0;
      eval    <= 1'b0;
      // reference taken once the 32-symbol FIFO has filled
      if (!ref_ready && ref_full) begin
        ref_sum   <= ref_run;
        ref_ready <= 1'b1;
      end
      // steady-speed moves while the reference is collected
      if (en && !ref_ready && sym_vld) begin
        logic signed [9:0] slew_nxt;
        slew_nxt = slew_acc + 10'(ref_slew);
        if (slew_nxt >= 10'sd256) begin
          slew_acc <= slew_nxt - 10'sd256;
          ph_step  <= PH_W'(1);
          ph_vld   <= 1'b1;
        end else if (slew_nxt <= -10'sd256) begin
          slew_acc <= slew_nxt + 10'sd256;
          ph_step  <= PH_W'(-1);
          ph_vld   <= 1'b1;
        end else begin
          slew_acc <= slew_nxt;
        end
      end
      if (en && ref_ready && cur_full && sym_vld) begin
        if (chk_cnt == 8'(CHECK - 1)) begin
          chk_cnt <= '0;
          eval    <= 1'b1;   // sums include this symbol on the next clock
        end else begin
          chk_cnt <= chk_cnt + 1'b1;
        end
      end
      if (eval) begin
        chk_vld  <= 1'b1;
        err_neg  <= (lhs < rhs);
        hold     <= 1'b0;
      end
      if (eval && !hold) begin
        blk_prev <= blk_sum;
        if (lhs < rhs) begin
          logic up;
          up = (moved_prev && blk_full && worse) ? !dir_up : dir_up;
          dir_up     <= up;
          ph_step    <= up ? PH_W'(STEP) : PH_W'(-STEP);
          ph_vld     <= 1'b1;
          moved_prev <= 1'b1;
          hold       <= 1'b1;
        end else begin
          moved_prev <= 1'b0;
        end
      end
    end
  end

endmodule
