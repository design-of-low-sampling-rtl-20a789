// tb_sync_ctrl: walks the controller through a DSSS packet with a CCK
// payload, a DSSS packet with a 2 Mb/s payload, an OFDM packet and an abort,
// checking state order, the AGC mode of every state, the start pulses, the
// 8-symbol AGC acquisition, and that phase moves pass only from the unit
// that owns the current state.
module tb_sync_ctrl;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0;
  logic ofdm_mode = 0, frame_start = 0, preamble_end = 0, packet_end = 0;
  rate_t rate = RATE_1M;
  logic sym_vld = 0, pkt_det = 0, bnd_done = 0, acq_done = 0, ofdm_afc_start = 0;
  phase_step_t acq_step = 8'sd3, dtrk_step = 8'sd1, ctrk_step = -8'sd1, ofdm_step = 8'sd6;
  logic acq_vld = 0, dtrk_vld = 0, ctrk_vld = 0, ofdm_vld = 0;
  sync_state_t state;
  agc_mode_t agc_mode;
  logic pkt_en, bnd_start, acq_start, dtrk_start, dtrk_en, cck_start, ctrk_en, ofdm_start;
  phase_step_t ph_step;
  logic ph_vld;
  int checks = 0, failures = 0;

  sync_ctrl dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (state %s, agc %s)", what, state.name(), agc_mode.name()); end
  endtask

  // pulse a signal for one cycle and return what a combinational output did
  task automatic pulse_sym(input int n);
    repeat (n) begin @(negedge clk); sym_vld = 1; @(negedge clk); sym_vld = 0; end
  endtask

  // try all four phase sources; exactly the expected one may pass
  task automatic try_moves(input int expect_step, input string what);
    int got = 0, val = 0;
    for (int src = 0; src < 4; src++) begin
      @(negedge clk);
      acq_vld = (src == 0); dtrk_vld = (src == 1); ctrk_vld = (src == 2); ofdm_vld = (src == 3);
      @(negedge clk);
      acq_vld = 0; dtrk_vld = 0; ctrk_vld = 0; ofdm_vld = 0;
      if (ph_vld) begin got++; val = int'(ph_step); end
    end
    check(expect_step == 0 ? got == 0 : (got == 1 && val == expect_step), what);
  endtask

  task automatic dsss_packet(input rate_t r);
    check(state == ST_WAIT_PKT && agc_mode == AGC_AVG && pkt_en, "waiting for packet, mean-power AGC");
    try_moves(0, "no moves while waiting");
    @(negedge clk); pkt_det = 1; #1;
    check(bnd_start, "boundary check starts on packet detection");
    @(negedge clk); pkt_det = 0;
    check(state == ST_BND1 && agc_mode == AGC_HOLD, "boundary check 1, AGC held");
    @(negedge clk); bnd_done = 1; @(negedge clk); bnd_done = 0;
    check(state == ST_AGC_ACQ && agc_mode == AGC_PEAK, "AGC acquisition on peak power");
    pulse_sym(7);
    check(state == ST_AGC_ACQ, "still AGC acquisition after 7 symbols");
    @(negedge clk); sym_vld = 1; #1;
    check(acq_start, "timing acquisition starts after the 8th symbol");
    @(negedge clk); sym_vld = 0;
    check(state == ST_TACQ && agc_mode == AGC_HOLD, "timing acquisition, AGC suspended");
    try_moves(3, "acquisition moves pass");
    @(negedge clk); acq_done = 1; #1;
    check(bnd_start, "second boundary check starts");
    @(negedge clk); acq_done = 0;
    check(state == ST_BND2 && agc_mode == AGC_HOLD, "boundary check 2");
    @(negedge clk); bnd_done = 1; #1;
    check(dtrk_start, "DSSS tracking starts");
    @(negedge clk); bnd_done = 0;
    check(state == ST_TRK_PRE && agc_mode == AGC_PEAK && dtrk_en, "preamble tracking");
    try_moves(1, "DSSS tracking moves pass");
    rate = r;
    @(negedge clk); preamble_end = 1; #1;
    check(cck_start == (r == RATE_11M || r == RATE_5M5), "CCK start only for CCK rates");
    @(negedge clk); preamble_end = 0;
    if (r == RATE_11M || r == RATE_5M5) begin
      check(state == ST_TRK_CCK && agc_mode == AGC_FWT && ctrk_en && !dtrk_en, "CCK tracking");
      try_moves(-1, "CCK tracking moves pass");
    end else begin
      check(state == ST_TRK_DSSS && agc_mode == AGC_PEAK && dtrk_en, "DSSS payload tracking");
      try_moves(1, "DSSS payload moves pass");
    end
    @(negedge clk); packet_end = 1; @(negedge clk); packet_end = 0;
    check(state == ST_RESET && agc_mode == AGC_MAX, "gain to maximum after packet");
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); @(negedge clk);
    dsss_packet(RATE_11M);
    dsss_packet(RATE_2M);
    // OFDM
    ofdm_mode = 1;
    @(negedge clk); @(negedge clk);
    check(state == ST_OFDM_WAIT && agc_mode == AGC_HOLD, "OFDM wait");
    try_moves(0, "no moves before frame start");
    @(negedge clk); frame_start = 1; #1;
    check(ofdm_start, "OFDM acquisition starts on frame start");
    @(negedge clk); frame_start = 0;
    check(state == ST_OFDM_ACQ, "OFDM acquisition");
    try_moves(6, "OFDM moves pass");
    @(negedge clk); ofdm_afc_start = 1; @(negedge clk); ofdm_afc_start = 0;
    check(state == ST_OFDM_RUN, "OFDM run after AFC start");
    try_moves(0, "no moves once the AFC runs");
    @(negedge clk); packet_end = 1; @(negedge clk); packet_end = 0;
    ofdm_mode = 0;
    @(negedge clk); @(negedge clk);
    // abort in the middle of a DSSS acquisition
    @(negedge clk); pkt_det = 1; @(negedge clk); pkt_det = 0;
    @(negedge clk); bnd_done = 1; @(negedge clk); bnd_done = 0;
    check(state == ST_AGC_ACQ, "abort test reached AGC acquisition");
    @(negedge clk); packet_end = 1; @(negedge clk); packet_end = 0;
    check(state == ST_RESET, "packet_end aborts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
