// sync_ctrl: sequencer of the timing synchronization and the AGC.
//
// DSSS/CCK packets follow the AGC state diagram: gain at maximum, mean-power
// AGC until a packet is detected, a symbol boundary check, AGC acquisition
// on peak power, timing acquisition with the AGC suspended, a second
// boundary check, then tracking on peak power. When the preamble ends the
// PSDU rate is checked: 1 and 2 Mb/s keep the DSSS tracker, 5.5 and 11 Mb/s
// switch to the CCK tracker and the FWT-power AGC until the packet ends.
// In OFDM mode the controller starts the OFDM acquisition at frame
// detection and holds the timing once the AFC has been started (the OFDM
// system has no timing tracking; the AFC takes over).
// The sequence follows the algorithm; the length of AGC acquisition
// (AGC_ACQ_SYMS symbols), the abort on packet_end in any state and the
// mode/frame_start/preamble_end/packet_end inputs (from packet framing
// outside this block) are this design's choices.
//
// Phase moves of the acquisition and tracking units are forwarded, from
// the unit that owns the current state only, as ph_step/ph_vld, registered.
// Timing: start and enable outputs are combinational decodes of the state
// and of the event inputs.
module sync_ctrl
  import ts_pkg::*;
#(
  parameter int AGC_ACQ_SYMS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ofdm_mode,
  input  logic        frame_start,
  input  logic        preamble_end,
  input  rate_t       rate,
  input  logic        packet_end,
  input  logic        sym_vld,
  input  logic        pkt_det,
  input  logic        bnd_done,
  input  logic        acq_done,
  input  logic        ofdm_afc_start,
  input  phase_step_t acq_step,
  input  logic        acq_vld,
  input  phase_step_t dtrk_step,
  input  logic        dtrk_vld,
  input  phase_step_t ctrk_step,
  input  logic        ctrk_vld,
  input  phase_step_t ofdm_step,
  input  logic        ofdm_vld,
  output sync_state_t state,
  output agc_mode_t   agc_mode,
  output logic        pkt_en,
  output logic        bnd_start,
  output logic        acq_start,
  output logic        dtrk_start,
  output logic        dtrk_en,
  output logic        cck_start,
  output logic        ctrk_en,
  output logic        ofdm_start,
  output phase_step_t ph_step,
  output logic        ph_vld
);

  logic [7:0] sym_cnt;
  logic       is_cck;

  assign is_cck = (rate == RATE_5M5) || (rate == RATE_11M);

  always_comb begin
    agc_mode   = AGC_HOLD;
    pkt_en     = 1'b0;
    bnd_start  = 1'b0;
    acq_start  = 1'b0;
    dtrk_start = 1'b0;
    dtrk_en    = 1'b0;
    cck_start  = 1'b0;
    ctrk_en    = 1'b0;
    ofdm_start = 1'b0;
    unique case (state)
      ST_RESET:     agc_mode = AGC_MAX;
      ST_WAIT_PKT: begin
        agc_mode  = AGC_AVG;
        pkt_en    = 1'b1;
        bnd_start = pkt_det;
      end
      ST_BND1:      agc_mode = AGC_HOLD;
      ST_AGC_ACQ: begin
        agc_mode  = AGC_PEAK;
        acq_start = sym_vld && (sym_cnt == 8'(AGC_ACQ_SYMS - 1));
      end
      ST_TACQ: begin
        agc_mode  = AGC_HOLD;
        bnd_start = acq_done;
      end
      ST_BND2: begin
        agc_mode   = AGC_HOLD;
        dtrk_start = bnd_done;
      end
      ST_TRK_PRE: begin
        agc_mode  = AGC_PEAK;
        dtrk_en   = 1'b1;
        cck_start = preamble_end && is_cck;
      end
      ST_TRK_DSSS: begin
        agc_mode = AGC_PEAK;
        dtrk_en  = 1'b1;
      end
      ST_TRK_CCK: begin
        agc_mode = AGC_FWT;
        ctrk_en  = 1'b1;
      end
      ST_OFDM_WAIT: ofdm_start = frame_start;
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state   <= ST_RESET;
      sym_cnt <= '0;
      ph_step <= '0;
      ph_vld  <= 1'b0;
    end else begin
      // phase commands of the unit that owns the state
      ph_vld <= 1'b0;
      unique case (state)
        ST_TACQ: if (acq_vld) begin
          ph_step <= acq_step; ph_vld <= 1'b1;
        end
        ST_TRK_PRE, ST_TRK_DSSS: if (dtrk_vld) begin
          ph_step <= dtrk_step; ph_vld <= 1'b1;
        end
        ST_TRK_CCK: if (ctrk_vld) begin
          ph_step <= ctrk_step; ph_vld <= 1'b1;
        end
        ST_OFDM_ACQ: if (ofdm_vld) begin
          ph_step <= ofdm_step; ph_vld <= 1'b1;
        end
        default: ;
      endcase

      if (packet_end && state != ST_RESET) begin
        state <= ST_RESET;
      end else begin
        unique case (state)
          ST_RESET:     state <= ofdm_mode ? ST_OFDM_WAIT : ST_WAIT_PKT;
          ST_WAIT_PKT:  if (ofdm_mode) state <= ST_OFDM_WAIT;
                        else if (pkt_det) state <= ST_BND1;
          ST_BND1:      if (bnd_done) begin
                          state   <= ST_AGC_ACQ;
                          sym_cnt <= '0;
                        end
          ST_AGC_ACQ:   if (sym_vld) begin
                          if (sym_cnt == 8'(AGC_ACQ_SYMS - 1)) state <= ST_TACQ;
                          sym_cnt <= sym_cnt + 1'b1;
                        end
          ST_TACQ:      if (acq_done) state <= ST_BND2;
          ST_BND2:      if (bnd_done) state <= ST_TRK_PRE;
          ST_TRK_PRE:   if (preamble_end) state <= is_cck ? ST_TRK_CCK : ST_TRK_DSSS;
          ST_OFDM_WAIT: if (!ofdm_mode) state <= ST_WAIT_PKT;
                        else if (frame_start) state <= ST_OFDM_ACQ;
          ST_OFDM_ACQ:  if (ofdm_afc_start) state <= ST_OFDM_RUN;
          default: ;
        endcase
      end
    end
  end

endmodule
