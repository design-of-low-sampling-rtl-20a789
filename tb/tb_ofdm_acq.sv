// tb_ofdm_acq: a model of the 802.11a short preamble, evaluated at any
// sampling instant from its twelve sub-carriers,
//   s(t) = sqrt(13/6)/64 * sum_k S_k exp(j 2 pi k t / 64),
// is sampled at t = n + phase/24 and quantised to the 6-bit ADC. The phase
// starts 0 to 18 steps (0 to 270 degrees) early and follows the module's
// moves. For every start phase the test checks: three 90-degree moves and a
// final correction, a final phase within 3 steps (45 degrees) of the
// optimum, the reported best index, and afc_start exactly 32 samples after
// done. start is given either a cycle before the first sample or with it.
module tb_ofdm_acq;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, in_vld = 0;
  sample_t in_i = '0, in_q = '0;
  phase_step_t ph_step;
  logic ph_vld, busy, done, afc_start;
  logic [1:0] best_idx;
  int checks = 0, failures = 0;
  int ph, moves;

  ofdm_acq dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && ph_vld) begin ph += int'(ph_step); moves++; end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sk [53];   // index k+26: 0, +1 or -1 (times 1+j)
  initial begin
    for (int i = 0; i < 53; i++) sk[i] = 0;
    sk[-24+26] = 1;  sk[-20+26] = -1; sk[-16+26] = 1;  sk[-12+26] = -1;
    sk[-8+26]  = -1; sk[-4+26]  = 1;  sk[4+26]   = -1; sk[8+26]   = -1;
    sk[12+26]  = 1;  sk[16+26]  = 1;  sk[20+26]  = 1;  sk[24+26]  = 1;
  end

  function automatic void sts(input real t, output real re, output real im);
    real a;
    re = 0.0; im = 0.0;
    for (int k = -26; k <= 26; k++) begin
      if (sk[k+26] != 0) begin
        a = 2.0 * 3.14159265358979 * real'(k) * t / 64.0;
        // (1+j) * exp(j a)
        re += real'(sk[k+26]) * ($cos(a) - $sin(a));
        im += real'(sk[k+26]) * ($cos(a) + $sin(a));
      end
    end
    re = re * $sqrt(13.0 / 6.0) / 64.0;
    im = im * $sqrt(13.0 / 6.0) / 64.0;
  endfunction

  function automatic sample_t quant(input real x);
    int v = int'($floor(x * 150.0 + 0.5));
    if (v > 31) v = 31;
    if (v < -32) v = -32;
    return sample_t'(v);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int off = -18; off <= 0; off++) begin
      int n_done, n_afc, n, err, exp_best;
      real re, im;
      ph = off; moves = 0; n_done = -1; n_afc = -1;
      // expected best: the tried phase off + 6i nearest to zero
      exp_best = 0;
      for (int i = 1; i < 4; i++) begin
        int a, b;
        a = off + 6 * i;
        b = off + 6 * exp_best;
        if ((a < 0 ? -a : a) < (b < 0 ? -b : b)) exp_best = i;
      end
      // even start phases: start one cycle before the first sample; odd
      // ones: start together with the first sample
      @(negedge clk);
      if (off % 2 == 0) begin start = 1; @(negedge clk); start = 0; end
      for (n = 0; n < 160; n++) begin
        sts(real'(n) + real'(ph) / 24.0, re, im);
        in_i = quant(re); in_q = quant(im); in_vld = 1;
        start = (n == 0) && (off % 2 != 0);
        @(negedge clk);
        in_vld = 0; start = 0;
        if (done) n_done = n;
        if (afc_start) n_afc = n;
        @(negedge clk);
      end
      err = ph < 0 ? -ph : ph;
      checks += 4;
      if (moves != 4) begin failures++; $display("off %0d: %0d moves", off, moves); end
      if (err > 3) begin failures++; $display("off %0d: final phase %0d", off, ph); end
      if (int'(best_idx) != exp_best) begin failures++; $display("off %0d: best %0d expected %0d", off, best_idx, exp_best); end
      if (n_done != 63 || n_afc != n_done + 32) begin
        failures++;
        $display("off %0d: done at sample %0d, afc_start at %0d", off, n_done, n_afc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
