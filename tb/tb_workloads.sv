// tb_workloads: the packet sizes and clock offsets of the receiver's
// evaluation, run through the whole timing synchronization in closed loop.
//
// The channel, VGA, ADC and ADDLL models are those of tb_timing_sync_top:
// triangular chip pulse sampled at t = k + (ADDLL phase + offset + drift)/24,
// fixed carrier rotation, 20 dB SNR, path loss undone by the AGC, 6-bit ADC.
// Here the sampling-clock offset is a variable. Workloads:
//   - 2 Mb/s DQPSK payload, 1000-byte PSDU (4000 symbols), at +50, -50,
//     +400 and -400 ppm;
//   - 11 Mb/s CCK payload, 1000-byte PSDU (1000 symbols), at the same
//     offsets;
//   - OFDM short-preamble acquisition at -800, -400, 400 and 800 ppm
//     from several start phases.
// Each DSSS packet must keep the phase within half a chip of the moving
// optimum (no chip slip) with an RMS error of at most 6 steps (90 degrees),
// in the tracked preamble and over the whole payload. Each OFDM packet must
// end its acquisition within 3 steps (the 45-degree resolution) plus the
// drift accumulated over the preambles, and raise afc_start once.
module tb_workloads;
  import ts_pkg::*;

  logic clk = 0, rst_n = 0;
  logic adc_vld = 0;
  sample_t adc_i = '0, adc_q = '0;
  logic ofdm_mode = 0, frame_start = 0, preamble_end = 0, packet_end = 0;
  logic signed [7:0] trk_ref_slew = '0;
  rate_t rate = RATE_1M;
  phase_step_t ph_step;
  logic ph_vld;
  gain_t vga_gain_db;
  logic afc_start;
  sync_state_t state;
  logic [3:0] boundary;
  logic pkt_det, acq_in_range;
  logic [1:0] ofdm_best_idx;
  logic trk_chk, trk_err_neg, trk_ref_ready, vga_upd, sync_busy, ofdm_acq_done;

  timing_sync_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- ADDLL
  int  ph = 0;         // accumulated ADDLL phase, steps
  real drift = 0.0;    // accumulated clock drift, steps
  real drift_rate = 0.0;    // steps per sample: ppm * 1e-6 * 24
  always @(posedge clk) if (rst_n && ph_vld) ph += int'(ph_step);

  int n_afc = 0;
  always @(posedge clk) if (rst_n && afc_start) n_afc++;

  // ------------------------------------------------------------- helpers
  int barker [11] = '{1, -1, 1, 1, -1, 1, 1, 1, -1, -1, -1};
  real chip_re [$], chip_im [$];

  function automatic real gauss();
    real s = 0.0;
    for (int i = 0; i < 4; i++) s += real'($urandom % 10000) / 10000.0 - 0.5;
    return s * 1.732;   // unit variance
  endfunction

  function automatic sample_t quant(input real x);
    int v = int'($floor(x + 0.5));
    if (v > 31) v = 31;
    if (v < -32) v = -32;
    return sample_t'(v);
  endfunction

  // phase error from the nearest optimum, in steps (chip-periodic)
  function automatic real phase_err(input int offset);
    real e = real'(ph + offset) + drift;
    e = e - 24.0 * $floor(e / 24.0 + 0.5);
    return e;
  endfunction

  real max_err_pre, max_err_pay, sq_pre, sq_pay;
  int  n_pre, n_pay;
  // lock criteria: no chip slip (error below half a chip, 12 steps) and an
  // RMS error of at most 6 steps (90 degrees, the resolution of the OFDM
  // acquisition)
  localparam real MAX_ERR = 11.5;
  localparam real MAX_RMS = 6.0;

  // ---------------------------------------------------------- DSSS packet
  // Chips are indexed from the packet start; the sample for sample index k
  // is taken at chip time k + (ph + offset + drift) / 24.
  task automatic dsss_packet(input rate_t r, input int pay_syms, input int offset);
    int pre_syms, n_chips, lead, k, total;
    real a_rx, theta, sigma;
    pre_syms = 192;                 // long preamble + PLCP header, 1 Mb/s
    lead = 30 * 11;                 // noise before the packet
    chip_re.delete(); chip_im.delete();
    for (int s = 0; s < pre_syms; s++) begin
      int d;
      d = ($urandom % 2) ? 1 : -1;
      for (int n = 0; n < 11; n++) begin
        chip_re.push_back(real'(d * barker[n])); chip_im.push_back(0.0);
      end
    end
    if (r == RATE_11M) begin
      for (int s = 0; s < pay_syms; s++)
        for (int n = 0; n < 8; n++) begin
          int q;
          q = $urandom % 4;   // QPSK chip of a random CCK codeword
          // phases of the codeword chips: p1 + exponent(n), drawn per chip
          // from the codeword formula below
          chip_re.push_back(0.0); chip_im.push_back(0.0);
        end
      // fill in real CCK codewords
      for (int s = 0; s < pay_syms; s++) begin
        int p1, p2, p3, p4, ex [8];
        p1 = $urandom % 4; p2 = $urandom % 4; p3 = $urandom % 4; p4 = $urandom % 4;
        ex[0] = p1 + p2 + p3 + p4; ex[1] = p1 + p3 + p4; ex[2] = p1 + p2 + p4;
        ex[3] = p1 + p4 + 2;       ex[4] = p1 + p2 + p3; ex[5] = p1 + p3;
        ex[6] = p1 + p2 + 2;       ex[7] = p1;
        for (int n = 0; n < 8; n++) begin
          int idx;
          idx = pre_syms * 11 + s * 8 + n;
          case (ex[n] % 4)
            0: begin chip_re[idx] =  1.0; chip_im[idx] =  0.0; end
            1: begin chip_re[idx] =  0.0; chip_im[idx] =  1.0; end
            2: begin chip_re[idx] = -1.0; chip_im[idx] =  0.0; end
            default: begin chip_re[idx] = 0.0; chip_im[idx] = -1.0; end
          endcase
        end
      end
    end else begin
      for (int s = 0; s < pay_syms; s++) begin
        int q;
        q = $urandom % 4;   // DQPSK symbol phase
        for (int n = 0; n < 11; n++) begin
          chip_re.push_back(real'(barker[n]) * ((q == 0) ? 1.0 : (q == 2) ? -1.0 : 0.0));
          chip_im.push_back(real'(barker[n]) * ((q == 1) ? 1.0 : (q == 3) ? -1.0 : 0.0));
        end
      end
    end
    n_chips = chip_re.size();
    a_rx  = 12.0 * (10.0 ** (-40.0 / 20.0));   // target level at 40 dB gain
    theta = 0.35;
    sigma = 0.1 * a_rx;                        // 20 dB SNR
    rate = r;
    max_err_pre = 0.0; max_err_pay = 0.0; sq_pre = 0.0; sq_pay = 0.0; n_pre = 0; n_pay = 0;
    total = lead + n_chips + 11;
    for (k = -lead; k < n_chips + 11; k++) begin
      real t, fr, re, im, g, e;
      int m;
      e = (real'(ph + offset) + drift) / 24.0;
      t = real'(k) + e;
      m = int'($floor(t));
      fr = t - real'(m);
      re = 0.0; im = 0.0;
      if (m >= 0 && m < n_chips) begin re += chip_re[m] * (1.0 - fr); im += chip_im[m] * (1.0 - fr); end
      if (m + 1 >= 0 && m + 1 < n_chips) begin re += chip_re[m+1] * fr; im += chip_im[m+1] * fr; end
      g = a_rx * (10.0 ** (real'(vga_gain_db) / 20.0));
      @(negedge clk);
      adc_vld = 1;
      adc_i = quant(g * (re * $cos(theta) - im * $sin(theta) + 0.1 * gauss()));
      adc_q = quant(g * (re * $sin(theta) + im * $cos(theta) + 0.1 * gauss()));
      preamble_end = (k == pre_syms * 11);
      packet_end = (k == n_chips + 10);
      drift += drift_rate;
      // phase error while tracking, once the reference has been collected
      if (k > 100 * 11 && k < pre_syms * 11) begin
        real pe = phase_err(offset);
        if (pe < 0) pe = -pe;
        if (pe > max_err_pre) max_err_pre = pe;
        sq_pre += pe * pe; n_pre++;
      end
      if (k > pre_syms * 11 + 200 && k < n_chips) begin
        real pe = phase_err(offset);
        if (pe < 0) pe = -pe;
        if (pe > max_err_pay) max_err_pay = pe;
        sq_pay += pe * pe; n_pay++;
      end
      if (k == 100 * 11) begin
        checks++;
        if (state != ST_TRK_PRE) begin
          failures++;
          $display("DSSS: not tracking by symbol 100 (state %s)", state.name());
        end
      end
    end
    @(negedge clk);
    adc_vld = 0; preamble_end = 0; packet_end = 0;
    sq_pre = $sqrt(sq_pre / real'(n_pre));
    sq_pay = $sqrt(sq_pay / real'(n_pay));
    $display("DSSS packet rate %s, %0.0f ppm: phase error max %0.1f / rms %0.1f steps (preamble), max %0.1f / rms %0.1f (payload), gain %0d",
             r.name(), drift_rate / 24.0e-6, max_err_pre, sq_pre, max_err_pay, sq_pay, vga_gain_db);
    checks += 4;
    if (max_err_pre > MAX_ERR) begin failures++; $display("preamble: chip slip"); end
    if (max_err_pay > MAX_ERR) begin failures++; $display("payload: chip slip"); end
    if (sq_pre > MAX_RMS) begin failures++; $display("preamble: rms error too large"); end
    if (sq_pay > MAX_RMS) begin failures++; $display("payload: rms error too large"); end
    repeat (5) @(negedge clk);
  endtask

  // ---------------------------------------------------------- OFDM packet
  int ppm_list [4] = '{50, -50, 400, -400};
  int ofdm_ppm [4] = '{-800, -400, 400, 800};
  int sk [53];
  function automatic void sts(input real t, output real re, output real im);
    real a;
    re = 0.0; im = 0.0;
    for (int k = -26; k <= 26; k++) begin
      if (sk[k+26] != 0) begin
        a = 2.0 * 3.14159265358979 * real'(k) * t / 64.0;
        re += real'(sk[k+26]) * ($cos(a) - $sin(a));
        im += real'(sk[k+26]) * ($cos(a) + $sin(a));
      end
    end
    re = re * $sqrt(13.0 / 6.0) / 64.0;
    im = im * $sqrt(13.0 / 6.0) / 64.0;
  endfunction

  task automatic ofdm_packet(input int offset);
    int afc_before;
    real pe, lim;
    // resolution of the search plus the drift since its first preamble
    lim = 3.0 + (drift_rate < 0 ? -drift_rate : drift_rate) * 160.0;
    ofdm_mode = 1;
    ph = 0;
    drift = 0.0;
    repeat (4) @(negedge clk);
    afc_before = n_afc;
    for (int n = 0; n < 160; n++) begin
      real re, im;
      sts(real'(n) + (real'(ph + offset) + drift) / 24.0, re, im);
      drift += drift_rate;
      @(negedge clk);
      adc_vld = 1;
      adc_i = quant(150.0 * re + 0.5 * gauss());
      adc_q = quant(150.0 * im + 0.5 * gauss());
      frame_start = (n == 0);
    end
    @(negedge clk);
    adc_vld = 0; frame_start = 0;
    pe = real'(ph + offset) + drift;
    $display("OFDM packet, %0.0f ppm: start phase %0d, final phase error %0.1f steps",
             drift_rate / 24.0e-6, offset, pe);
    checks += 2;
    if (pe > lim || pe < -lim) begin failures++; $display("OFDM acquisition error too large"); end
    if (n_afc != afc_before + 1) begin failures++; $display("afc_start count wrong"); end
    @(negedge clk); packet_end = 1; @(negedge clk); packet_end = 0;
    ofdm_mode = 0;
    repeat (4) @(negedge clk);
  endtask


  initial begin
    for (int i = 0; i < 53; i++) sk[i] = 0;
    sk[-24+26] = 1;  sk[-20+26] = -1; sk[-16+26] = 1;  sk[-12+26] = -1;
    sk[-8+26]  = -1; sk[-4+26]  = 1;  sk[4+26]   = -1; sk[8+26]   = -1;
    sk[12+26]  = 1;  sk[16+26]  = 1;  sk[20+26]  = 1;  sk[24+26]  = 1;
    repeat (4) @(posedge clk);
    rst_n <= 1;
    repeat (4) @(negedge clk);
    foreach (ppm_list[i]) begin
      drift_rate = real'(ppm_list[i]) * 24.0e-6;
      drift = 0.0;
      dsss_packet(RATE_2M, 4000, 11 - 7 * i);
      dsss_packet(RATE_11M, 1000, 5 * i - 9);
    end
    foreach (ofdm_ppm[i])
      for (int off = -16; off <= 0; off += 8) begin
        drift_rate = real'(ofdm_ppm[i]) * 24.0e-6;
        ofdm_packet(off - i);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
