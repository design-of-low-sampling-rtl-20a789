// ofdm_acq: timing acquisition for OFDM (802.11a/g) packets at one sample
// per sample period, on the short preambles.
//
// Each 16-sample short preamble is correlated with the known short training
// sequence S, and the correlation is normalised by the received energy:
//   C = sum S_k * conj(R_k),  P = |C| / norm(R)
// (norm(S) is constant and dropped, as in the reduced hardware formula).
// The first short preamble is measured at the current sampling phase, and
// the phase is moved by 90 degrees before each of the next three, so four
// phases around the circle are tried. After the fourth (preamble_count = 3)
// the best one i is chosen and the phase is corrected by (i - 3) * 90
// degrees, the formula Phase = (4 - i') * (-90 deg) with i' = i + 1 counted
// from one. Two further preambles are then let pass at the corrected phase
// before afc_start, so that the frequency estimator sees two preambles
// sampled at the chosen phase. All of this follows the algorithm.
//
// This design's choices: P_i are compared without division or square root,
// P_i > P_best <=> |C_i|^2 * E_best > |C_best|^2 * E_i with E = norm(R)^2;
// S is the 802.11a short training sequence of the standard scaled by 800 and
// rounded to 8 bits; the module relies on frame detection for the preamble
// boundary (start).
//
// Interface: start marks the first sample of the first short preamble: the
// sample accepted in the same cycle, or the next one if in_vld is low; in_vld/in_i/in_q are the ADC samples. Phase
// moves leave on ph_step/ph_vld (one cycle, 1/PHASE_RES of a sample per
// step); best_idx is the chosen phase (0..3); done pulses with the final
// correction and afc_start WAIT_PRE * 16 samples later.
module ofdm_acq
  import ts_pkg::*;
#(
  parameter int N_PRE    = 4,
  parameter int WAIT_PRE = 2,
  parameter int QSTEP    = PHASE_RES / 4
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        in_vld,
  input  sample_t     in_i,
  input  sample_t     in_q,
  output phase_step_t ph_step,
  output logic        ph_vld,
  output logic [1:0]  best_idx,
  output logic        busy,
  output logic        done,
  output logic        afc_start
);

  localparam int PLEN = 16;
  localparam int AW   = 24;

  // round(800 * t(n)) of the 802.11a short training symbol, n = 0..15
  localparam logic signed [7:0] STS_RE [PLEN] = '{
    8'sd37, -8'sd106, -8'sd11, 8'sd114, 8'sd74, 8'sd114, -8'sd11, -8'sd106,
    8'sd37, 8'sd2, -8'sd63, -8'sd10, 8'sd0, -8'sd10, -8'sd63, 8'sd2};
  localparam logic signed [7:0] STS_IM [PLEN] = '{
    8'sd37, 8'sd2, -8'sd63, -8'sd10, 8'sd0, -8'sd10, -8'sd63, 8'sd2,
    8'sd37, -8'sd106, -8'sd11, 8'sd114, 8'sd74, 8'sd114, -8'sd11, -8'sd106};

  typedef enum logic [1:0] {S_IDLE, S_MEAS, S_WAIT} state_t;
  state_t state;

  logic [3:0] k;
  logic [2:0] pre_cnt;
  logic [7:0] wait_cnt;
  logic signed [AW-1:0] c_re, c_im, c_re_n, c_im_n;
  logic [AW-1:0] e_acc, e_n;
  logic [63:0] c2_n, c2_best, e_best;
  logic        better;

  always_comb begin
    logic signed [AW-1:0] a, b, c, d;
    a = AW'(STS_RE[k]);
    b = AW'(STS_IM[k]);
    c = AW'(in_i);
    d = AW'(in_q);
    c_re_n = c_re + a * c + b * d;
    c_im_n = c_im + b * c - a * d;
    e_n    = e_acc + AW'(c * c + d * d);
    c2_n   = 64'(c_re_n * c_re_n) + 64'(c_im_n * c_im_n);
    better = (pre_cnt == '0) || (c2_n * e_best > c2_best * 64'(e_n));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      k         <= '0;
      pre_cnt   <= '0;
      wait_cnt  <= '0;
      c_re      <= '0;
      c_im      <= '0;
      e_acc     <= '0;
      c2_best   <= '0;
      e_best    <= '0;
      best_idx  <= '0;
      ph_step   <= '0;
      ph_vld    <= 1'b0;
      done      <= 1'b0;
      afc_start <= 1'b0;
    end else begin
      ph_vld    <= 1'b0;
      done      <= 1'b0;
      afc_start <= 1'b0;
      case (state)
        // c_re, c_im and e_acc are zero here; a sample arriving with start
        // is the first one of the first preamble
        S_IDLE: if (start) begin
          state   <= S_MEAS;
          pre_cnt <= '0;
          if (in_vld) begin
            k     <= 4'd1;
            c_re  <= c_re_n;
            c_im  <= c_im_n;
            e_acc <= e_n;
          end else begin
            k     <= '0;
          end
        end
        S_MEAS: if (in_vld) begin
          if (k == 4'(PLEN - 1)) begin
            logic [1:0] bi;
            bi = better ? pre_cnt[1:0] : best_idx;
            k     <= '0;
            c_re  <= '0;
            c_im  <= '0;
            e_acc <= '0;
            if (better) begin
              c2_best  <= c2_n;
              e_best   <= 64'(e_n);
              best_idx <= pre_cnt[1:0];
            end
            ph_vld <= 1'b1;
            if (pre_cnt == 3'(N_PRE - 1)) begin
              ph_step  <= PH_W'((int'(bi) - (N_PRE - 1)) * QSTEP);
              done     <= 1'b1;
              state    <= S_WAIT;
              wait_cnt <= '0;
            end else begin
              ph_step <= PH_W'(QSTEP);
              pre_cnt <= pre_cnt + 1'b1;
            end
          end else begin
            k     <= k + 1'b1;
            c_re  <= c_re_n;
            c_im  <= c_im_n;
            e_acc <= e_n;
          end
        end
        S_WAIT: if (in_vld) begin
          if (wait_cnt == 8'(WAIT_PRE * PLEN - 1)) begin
            afc_start <= 1'b1;
            state     <= S_IDLE;
          end else begin
            wait_cnt <= wait_cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

endmodule
