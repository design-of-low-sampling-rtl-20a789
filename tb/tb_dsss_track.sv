// tb_dsss_track: closes the loop around the DSSS tracker with a model of the
// symbol peak power versus sampling phase, P = P0 * G * (1 - f)^2, f the
// distance from the optimum in chips, G the linear VGA gain.
//  1. no drift, fixed gain: ref_ready after exactly 32 symbols, one check
//     every 4 symbols, no move while at the optimum;
//  2. the gain rises 10 dB with a matching rise of the measured power (the
//     channel is unchanged): normalised power is unchanged, no error;
//  3. the gain rises 10 dB while the measured power stays put (an AGC hiding
//     a loss): the normalised power falls, the error must show and the phase
//     must move.
// Steps 1-3 run without noise, so that an unchanged power gives e = 0.
//  4. a sampling-clock drift of 0.1 step per symbol (about 400 ppm at 11
//     chips per symbol and 24 steps per chip): the phase must stay within 6
//     steps of the moving optimum over 600 symbols, and must have moved.
//  5. the same drift, both ways, with ref_slew = +-26/256 step per symbol:
//     during the 32-symbol reference collection exactly 3 one-step moves in
//     the drift's direction (32 * 26 / 256 = 3.25), and the phase within 1
//     step of the optimum when the reference is taken.
module tb_dsss_track;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, en = 0, sym_vld = 0;
  pwr_t sym_peak = '0;
  gain_t gain_db = 6'd30;
  logic signed [7:0] ref_slew = '0;
  phase_step_t ph_step;
  logic ph_vld, ref_ready, chk_vld, err_neg;
  int checks = 0, failures = 0;
  int ph = 0, moves = 0, chks = 0, negs = 0;
  real opt = 0.0;

  dsss_track dut (.*);

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
    sym_peak = pwr_t'(model_peak(extra_db) + ((noise > 0) ? $urandom % noise : 0));
    sym_vld = 1;
    n_sym++;
    @(negedge clk);
    sym_vld = 0;
  endtask

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (ph=%0d moves=%0d chks=%0d negs=%0d)", what, ph, moves, chks, negs); end
  endtask

  initial begin
    int max_err;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // 1
    @(negedge clk); start = 1; en = 1; @(negedge clk); start = 0;
    repeat (31) symbol(0.0);
    repeat (3) @(negedge clk);
    check(!ref_ready, "reference not ready after 31 symbols");
    symbol(0.0);
    repeat (3) @(negedge clk);
    check(ref_ready, "reference ready after 32 symbols");
    chks = 0;
    repeat (40) symbol(0.0);
    repeat (3) @(negedge clk);
    check(chks == 10, "one check per 4 symbols");
    check(moves == 0 && negs == 0, "no move at the optimum");
    // 2
    gain_db = 6'd40;
    repeat (40) symbol(0.0);
    check(negs == 0 && moves == 0, "gain and power rise together: no error");
    // 3: measured power unchanged although the gain rose another 3 dB
    gain_db = 6'd50;
    repeat (24) symbol(-10.0);
    check(negs > 0 && moves > 0, "hidden power loss is detected");
    // 4
    gain_db = 6'd30;
    noise = 200;
    opt = 0.0; ph = 0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (32) symbol(0.0);
    moves = 0; max_err = 0;
    for (int s = 0; s < 600; s++) begin
      int e;
      opt += 0.1;
      symbol(0.0);
      e = int'(real'(ph) - opt);
      if (e < 0) e = -e;
      if (e > max_err) max_err = e;
    end
    $display("drift: max error %0d steps, %0d moves, final ph %0d opt %0.1f", max_err, moves, ph, opt);
    check(max_err <= 6, "phase held within 6 steps under drift");
    check(moves * 2 >= 40, "tracker follows the drift (2-step moves)");
    // 5
    for (int dir = 1; dir >= -1; dir -= 2) begin
      real e;
      ref_slew = 8'(26 * dir);
      opt = 0.0; ph = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      moves = 0;
      while (!ref_ready) begin
        opt += 0.1 * dir;
        symbol(0.0);
        repeat (2) @(negedge clk);
      end
      e = real'(ph) - opt;
      $display("slew %0d: %0d moves, ph %0d, opt %0.1f", ref_slew, moves, ph, opt);
      check(moves == 3 && ph == 3 * dir, "steady-speed moves during reference collection");
      check(e <= 1.0 && e >= -1.0, "phase kept near the optimum while collecting");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
