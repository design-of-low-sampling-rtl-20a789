// tb_cck_track: closes the loop around the CCK tracker with a model of the
// maximum FWT power versus sampling phase, P = P0 * G * (1 - f)^2.
//  1. no drift, fixed gain: ref_ready after exactly 16 symbols, one check
//     every 4 symbols, no move at the optimum;
//  2. power 5 % below the reference: inside the 0.9 margin, no error;
//  3. power 15 % below the reference: error and moves;
//  4. gain +10 dB with measured power x10: no error; gain +10 dB with the
//     measured power unchanged: error;
//  5. drift of 0.07 step per 8-chip symbol (about 400 ppm): phase held within
//     6 steps over 800 symbols.
// Steps 1-4 run without noise.
module tb_cck_track;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, en = 0, fwt_vld = 0;
  pwr_t fwt_pwr = '0;
  gain_t gain_db = 6'd30;
  phase_step_t ph_step;
  logic ph_vld, ref_ready, chk_vld, err_neg;
  int checks = 0, failures = 0;
  int ph = 0, moves = 0, chks = 0, negs = 0;
  real opt = 0.0;

  cck_track dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && ph_vld) begin ph += int'(ph_step); moves++; end
    if (rst_n && chk_vld) begin chks++; if (err_neg) negs++; end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model_peak(input real extra_db);
    real f, g;
    f = (real'(ph) - opt) / PHASE_RES;
    if (f < 0) f = -f;
    if (f > 1.0) f = 1.0;
    g = 10.0 ** ((real'(gain_db) - 30.0 + extra_db) / 10.0);
    return int'(20000.0 * g * (1.0 - f) * (1.0 - f));
  endfunction

  int n_sym = 0;
  int noise = 0;
  task automatic symbol(input real extra_db);
    repeat (10) @(negedge clk);
    fwt_pwr = pwr_t'(model_peak(extra_db) + ((noise > 0) ? $urandom % noise : 0));
    fwt_vld = 1;
    n_sym++;
    @(negedge clk);
    fwt_vld = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (ph=%0d moves=%0d chks=%0d negs=%0d)", what, ph, moves, chks, negs); end
  endtask

  initial begin
    int max_err;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); start = 1; en = 1; @(negedge clk); start = 0;
    repeat (15) symbol(0.0);
    repeat (3) @(negedge clk);
    check(!ref_ready, "reference not ready after 15 symbols");
    symbol(0.0);
    repeat (3) @(negedge clk);
    check(ref_ready, "reference ready after 16 symbols");
    chks = 0;
    repeat (40) symbol(0.0);
    repeat (3) @(negedge clk);
    check(chks == 10, "one check per 4 symbols");
    check(moves == 0 && negs == 0, "no move at the optimum");
    repeat (24) symbol(-0.223);   // -5 %
    check(negs == 0 && moves == 0, "5 % loss is inside the 0.9 margin");
    repeat (8) symbol(0.0);
    gain_db = 6'd40;
    repeat (24) symbol(0.0);
    check(negs == 0 && moves == 0, "gain and power rise together: no error");
    gain_db = 6'd30;
    repeat (8) symbol(0.0);
    repeat (12) symbol(-0.706);   // -15 %
    check(negs > 0 && moves > 0, "15 % loss is detected");
    // hidden loss
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    ph = 0; negs = 0; moves = 0;
    repeat (16) symbol(0.0);
    gain_db = 6'd40;
    repeat (12) symbol(-10.0);
    check(negs > 0, "hidden power loss is detected");
    // drift
    gain_db = 6'd30;
    noise = 200;
    opt = 0.0; ph = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (16) symbol(0.0);
    moves = 0; max_err = 0;
    for (int s = 0; s < 800; s++) begin
      int e;
      opt += 0.07;
      symbol(0.0);
      e = int'(real'(ph) - opt);
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
    end
    $display("drift: max error %0d steps, %0d moves, final ph %0d opt %0.1f", max_err, moves, ph, opt);
    check(max_err <= 6, "phase held within 6 steps under drift");
    check(moves * 2 >= 40, "tracker follows the drift (2-step moves)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
