// tb_agc: drives the AGC in each mode with powers a known number of dB away
// from the expected level and checks the new gain against
// G - round(10*log10(M/D)) computed with floating point in the testbench
// (1 dB tolerance for the fixed-point logarithm), clamping at 0 and 63,
// the 4-symbol accumulation of the FWT mode, hold, and the forced maximum.
// After every change it checks that the next measurement is ignored.
module tb_agc;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, sym_vld = 0, fwt_vld = 0;
  agc_mode_t mode = AGC_HOLD;
  pwr_t sym_peak = '0, fwt_pwr = '0;
  logic [22:0] sym_sum = '0;
  gain_t gain_db;
  logic upd;
  int checks = 0, failures = 0;
  bit upd_seen = 0;
  localparam real D_PEAK = 17424.0;          // (11*12)^2
  localparam real D_AVG_SUM = 1714.0 * 11.0; // mean 131*144/11 over 11 chips
  localparam real D_FWT4 = 4.0 * 8755.0;     // 4 * 0.95 * (8*12)^2

  agc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expect_gain(input int g, input real m, input real d);
    int e;
    e = g - int'($floor(10.0 * $log10(m / d) + 0.5));
    if (e < 0) e = 0;
    if (e > 63) e = 63;
    return e;
  endfunction

  task automatic chk_gain(input int expv, input string what);
    int diff;
    diff = int'(gain_db) - expv;
    checks++;
    if (diff > 1 || diff < -1) begin
      failures++;
      $display("%s: gain %0d expected %0d", what, gain_db, expv);
    end
  endtask

  task automatic sym(input int peak, input int sum);
    @(negedge clk);
    sym_peak = pwr_t'(peak); sym_sum = 23'(sum); sym_vld = 1;
    @(negedge clk);
    if (upd) upd_seen = 1;
    sym_vld = 0;
  endtask

  // after a change the next measurement is ignored: send a far-off one and
  // check that the gain stays
  task automatic discard();
    int g;
    if (upd_seen) begin
      g = int'(gain_db);
      sym(1, 1);
      checks++;
      if (int'(gain_db) != g) begin
        failures++;
        $display("measurement after a change was not discarded");
      end
    end
    upd_seen = 0;
  endtask

  initial begin
    int g0, ex;
    real m;
    repeat (3) @(posedge clk);
    checks++; if (gain_db != 6'd63) failures++;
    rst_n <= 1;
    // peak mode: offsets from -20 dB to +20 dB
    mode = AGC_PEAK;
    for (int x = -20; x <= 14; x += 3) begin
      g0 = int'(gain_db);
      m = D_PEAK * (10.0 ** (real'(x) / 10.0));
      ex = expect_gain(g0, m, D_PEAK);
      sym(int'(m), 0);
      chk_gain(ex, $sformatf("peak %0d dB", x));
      discard();
    end
    // upd pulses on a change, the cycle after sym_vld
    mode = AGC_PEAK;
    @(negedge clk);
    sym_peak = pwr_t'(int'(D_PEAK * 4.0)); sym_vld = 1;
    g0 = int'(gain_db);
    @(posedge clk); #1;
    checks++; if (!upd || int'(gain_db) == g0) failures++;
    @(negedge clk); sym_vld = 0;
    upd_seen = 1;
    discard();
    // average mode
    mode = AGC_AVG;
    for (int x = -12; x <= 12; x += 4) begin
      g0 = int'(gain_db);
      m = D_AVG_SUM * (10.0 ** (real'(x) / 10.0));
      ex = expect_gain(g0, m, D_AVG_SUM);
      sym(0, int'(m));
      chk_gain(ex, $sformatf("avg %0d dB", x));
      discard();
    end
    // clamp at 0 and at 63
    sym(0, 23'h7fffff); sym(0, 23'h7fffff); sym(0, 23'h7fffff);
    sym(0, 23'h7fffff); sym(0, 23'h7fffff); sym(0, 23'h7fffff);
    chk_gain(0, "clamp low");
    sym(0, 1); sym(0, 1); sym(0, 1); sym(0, 1);
    chk_gain(63, "clamp high");
    // hold
    mode = AGC_HOLD;
    sym(100, 100);
    checks++; if (gain_db != 6'd63) failures++;
    // FWT mode: only the 4th power updates, using the sum of all 4
    mode = AGC_FWT;
    g0 = int'(gain_db);
    for (int i = 0; i < 4; i++) begin
      @(negedge clk);
      fwt_pwr = pwr_t'(8755 * 10 + i * 1000); fwt_vld = 1;
      @(negedge clk);
      fwt_vld = 0;
      if (i < 3) begin checks++; if (int'(gain_db) != g0) failures++; end
    end
    chk_gain(expect_gain(g0, 4.0 * 87550.0 + 6000.0, D_FWT4), "fwt");
    // forced maximum
    mode = AGC_MAX;
    @(negedge clk); @(negedge clk);
    checks++; if (gain_db != 6'd63) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
