// cck_track: timing tracking for CCK (5.5 and 11 Mb/s) payload symbols.
//
// CCK codewords lack the Barker code's correlation property, so the tracked
// quantity is the largest power at the output of the CCK codeword
// correlator (FWT) per symbol. The structure is that of the DSSS tracker:
// a reference S_ref from the first REF_LEN = 16 symbol powers after start,
// a running sum S_cur of the latest CUR_LEN = 8, gain normalisation, and
//   e = S_cur / (CUR_LEN * G) - 0.9 * S_ref / (REF_LEN * G).
// The reference is scaled by 0.9 (SCALE_NUM/SCALE_DEN) because using it
// unscaled makes the tracker move too often. The lengths and the 0.9 follow
// the algorithm. As in dsss_track, each power is normalised by the gain of
// its own symbol on entry (multiplied by 16*10^((GAIN_MAX-G)/10)) rather
// than each sum by the current gain, and the sign test is
//   e < 0 <=> S_cur * REF_LEN * SCALE_DEN < S_ref * CUR_LEN * SCALE_NUM.
// How often e is tested (CHECK) and the move direction are not given for
// CCK; this design tests every CHECK = 4 symbols and uses the same
// hill-climb direction rule as the DSSS tracker: keep the previous
// direction unless the normalised power of the 2*CHECK symbols since the
// last move fell below that of the 2*CHECK symbols before it, with no move
// at the check right after a move. Moves are STEP = 2 steps (30 degrees).
// The long judgement matters more here than for DSSS: away from the
// optimum, chip-to-chip interference makes the FWT maximum vary by tens of
// percent with the data.
//
// Interface: start clears and begins reference collection; en keeps the
// tracker running; fwt_pwr/fwt_vld one per CCK symbol; gain_db from the
// AGC. Outputs ph_step/ph_vld, ref_ready, chk_vld and err_neg as in
// dsss_track.
module cck_track
  import ts_pkg::*;
#(
  parameter int REF_LEN   = 16,
  parameter int CUR_LEN   = 8,
  parameter int SCALE_NUM = 9,
  parameter int SCALE_DEN = 10,
  parameter int CHECK   = 4,
  parameter int STEP    = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        en,
  input  pwr_t        fwt_pwr,
  input  logic        fwt_vld,
  input  gain_t       gain_db,
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

  run_sum_fifo #(.LEN(REF_LEN), .W(NW)) u_fifo2 (
    .clk, .rst_n, .clear(start), .push(fwt_vld && en && !ref_ready),
    .din(p_norm), .sum(ref_run), .full(ref_full));

  run_sum_fifo #(.LEN(CUR_LEN), .W(NW)) u_fifo1 (
    .clk, .rst_n, .clear(start), .push(fwt_vld && en),
    .din(p_norm), .sum(cur_sum), .full(cur_full));

  // power of the latest 2*CHECK symbols, to judge the previous move
  run_sum_fifo #(.LEN(2 * CHECK), .W(NW), .SUM_W(BS_W)) u_blk (
    .clk, .rst_n, .clear(start), .push(fwt_vld && en),
    .din(p_norm), .sum(blk_sum), .full(blk_full));

  always_comb begin
    p_norm = NW'(fwt_pwr) * NW'(db_to_lin(gain_t'(GAIN_MAX) - gain_db));
    worse  = blk_sum < blk_prev;
    lhs = PW'(cur_sum) * PW'(REF_LEN * SCALE_DEN);
    rhs = PW'(ref_sum) * PW'(CUR_LEN * SCALE_NUM);
  end

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
    end else begin
      ph_vld  <= 1'b0;
      chk_vld <= 1'b0;
      eval    <= 1'b0;
      // reference taken once the REF_LEN FIFO has filled
      if (!ref_ready && ref_full) begin
        ref_sum   <= ref_run;
        ref_ready <= 1'b1;
      end
      if (en && ref_ready && cur_full && fwt_vld) begin
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
