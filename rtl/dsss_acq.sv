// dsss_acq: 1x-sampling timing acquisition for DSSS (Barker) preambles.
//
// With one sample per chip the sampling phase cannot be read off neighbouring
// samples, so the phase is found by trying phases and comparing windowed
// correlator power. Following the algorithm, the power is first measured at
// three phases 120 degrees apart; the best one (B) and the second best (N)
// bound the decision region, and a fourth measurement is taken in its middle
// (M, 60 degrees from B towards N). Three slopes are formed as in the slope
// figure:
//   slope_1 = P(B) - P(M), slope_2 = P(M) - P(N), slope_3 = P(B) - P(N).
// slope_1 and slope_2 tell whether M lies in the optimum range; slope_3 picks
// how to finish. The exact decision rules are this design's own (the state
// diagram of the method is not available):
//   slope_1 <= 0 and slope_2 >= 0 : M is the best; stay at M, or move slowly
//                                   (FINE steps) towards B if slope_3 > 0;
//   otherwise                      : B is the best; move fast (60 degrees)
//                                   back to B.
// Each measurement skips SETTLE symbols after a phase change and then sums
// sym_sum over NMEAS = 4 symbols (n = 1..4 in the slope formula).
//
// Interface: start begins an acquisition from the current phase; phase
// moves are issued as ph_step (signed, in 1/PHASE_RES of a sample) with a
// one-cycle ph_vld; done pulses with the last move. One acquisition takes
// 4 * (SETTLE + NMEAS) symbols.
module dsss_acq
  import ts_pkg::*;
#(
  parameter int SUM_W  = PWR_W + 4,
  parameter int NMEAS  = 4,
  parameter int SETTLE = 1,
  parameter int FINE   = PHASE_RES / 12
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SUM_W-1:0] sym_sum,
  input  logic             sym_vld,
  output phase_step_t      ph_step,
  output logic             ph_vld,
  output logic             busy,
  output logic             done,
  output logic             in_range     // last decision: M was in range
);

  localparam int AW = SUM_W + 3;
  localparam int STEP120 = PHASE_RES / 3;
  localparam int STEP60  = PHASE_RES / 6;

  typedef enum logic [1:0] {S_IDLE, S_COARSE, S_PICK, S_MID} state_t;
  state_t state;

  logic [AW-1:0] acc;
  logic [AW-1:0] p_coarse [3];
  logic [1:0]    idx;          // coarse phase being measured
  logic [3:0]    sym_cnt;
  logic [1:0]    b_idx, n_idx;
  logic signed [1:0] dir;      // +1: N lies 120 degrees after B

  // best and second-best coarse phases
  logic [1:0] best, second;
  always_comb begin
    best = 2'd0;
    if (p_coarse[1] > p_coarse[best]) best = 2'd1;
    if (p_coarse[2] > p_coarse[best]) best = 2'd2;
    second = (best == 2'd0) ? 2'd1 : 2'd0;
    for (int i = 0; i < 3; i++)
      if (2'(i) != best && p_coarse[i] > p_coarse[second]) second = 2'(i);
  end

  logic signed [AW:0] slope_1, slope_2, slope_3;
  logic [AW-1:0] acc_next;
  always_comb begin
    acc_next = acc + AW'(sym_sum);
    slope_1 = $signed({1'b0, p_coarse[b_idx]}) - $signed({1'b0, acc_next});
    slope_2 = $signed({1'b0, acc_next}) - $signed({1'b0, p_coarse[n_idx]});
    slope_3 = $signed({1'b0, p_coarse[b_idx]}) - $signed({1'b0, p_coarse[n_idx]});
  end

  // phase move from coarse phase 2 (240 degrees) to M
  function automatic phase_step_t step_to_mid(input logic [1:0] b,
                                              input logic signed [1:0] d);
    return PH_W'(int'(b) * STEP120 + int'(d) * STEP60 - 2 * STEP120);
  endfunction

  logic measuring;
  always_comb measuring = sym_cnt >= 4'(SETTLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      acc      <= '0;
      for (int i = 0; i < 3; i++) p_coarse[i] <= '0;
      idx      <= '0;
      sym_cnt  <= '0;
      b_idx    <= '0;
      n_idx    <= '0;
      dir      <= 2'sd1;
      ph_step  <= '0;
      ph_vld   <= 1'b0;
      done     <= 1'b0;
      in_range <= 1'b0;
    end else begin
      ph_vld <= 1'b0;
      done   <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state   <= S_COARSE;
          idx     <= '0;
          sym_cnt <= '0;
          acc     <= '0;
        end
        S_COARSE: if (sym_vld) begin
          if (!measuring) begin
            sym_cnt <= sym_cnt + 1'b1;
          end else if (sym_cnt == 4'(SETTLE + NMEAS - 1)) begin
            p_coarse[idx] <= acc_next;
            acc     <= '0;
            sym_cnt <= '0;
            if (idx == 2'd2) begin
              state <= S_PICK;
            end else begin
              idx     <= idx + 1'b1;
              ph_step <= PH_W'(STEP120);
              ph_vld  <= 1'b1;
            end
          end else begin
            acc     <= acc_next;
            sym_cnt <= sym_cnt + 1'b1;
          end
        end
        // all three coarse powers known: move to the middle of the region
        S_PICK: begin
          b_idx   <= best;
          n_idx   <= second;
          dir     <= (second == ((best == 2'd2) ? 2'd0 : best + 2'd1)) ? 2'sd1 : -2'sd1;
          ph_step <= step_to_mid(best,
                       (second == ((best == 2'd2) ? 2'd0 : best + 2'd1)) ? 2'sd1 : -2'sd1);
          ph_vld  <= 1'b1;
          state   <= S_MID;
        end
        S_MID: if (sym_vld) begin
          if (!measuring) begin
            sym_cnt <= sym_cnt + 1'b1;
          end else if (sym_cnt == 4'(SETTLE + NMEAS - 1)) begin
            state   <= S_IDLE;
            done    <= 1'b1;
            ph_vld  <= 1'b1;
            if (slope_1 <= 0 && slope_2 >= 0) begin
              in_range <= 1'b1;
              ph_step  <= (slope_3 > 0) ? PH_W'(-int'(dir) * FINE) : '0;
            end else begin
              in_range <= 1'b0;
              ph_step  <= PH_W'(-int'(dir) * STEP60);
            end
          end else begin
            acc     <= acc_next;
            sym_cnt <= sym_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
