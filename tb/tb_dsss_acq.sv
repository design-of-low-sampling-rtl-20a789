// tb_dsss_acq: closes the loop around the DSSS acquisition with a model of
// the windowed correlator power versus sampling phase. With a triangular chip
// pulse sampled f of a chip away from its peak, the window holds the peak
// (1-f)^2 and its neighbour f^2 of the power, so
//   P(f) = P0 * ((1-f)^2 + f^2),  f = circular distance / PHASE_RES.
// For every optimum offset (0..23 steps from the start phase) the test
// checks that the final phase is within FINE (2 steps, 30 degrees) of the
// optimum, that exactly four moves are issued (two 120-degree moves, the move
// to the middle of the decision region and the final move) and that done
// comes 4 * (SETTLE + NMEAS) = 20 symbols after start.
module tb_dsss_acq;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, sym_vld = 0;
  logic [22:0] sym_sum = '0;
  phase_step_t ph_step;
  logic ph_vld, busy, done, in_range;
  int checks = 0, failures = 0;
  int ph, moves, syms, n_in_range;

  dsss_acq dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (ph_vld) begin ph += int'(ph_step); moves++; end

  function automatic int circ(input int a);
    int m = ((a % PHASE_RES) + PHASE_RES) % PHASE_RES;
    return (m > PHASE_RES / 2) ? PHASE_RES - m : m;
  endfunction

  function automatic int model_pwr(input int phase, input int opt);
    real f = real'(circ(phase - opt)) / PHASE_RES;
    return int'(100000.0 * ((1.0 - f) * (1.0 - f) + f * f));
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    n_in_range = 0;
    for (int opt = 0; opt < PHASE_RES; opt++) begin
      ph = 0; moves = 0; syms = 0;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      while (!done) begin
        repeat (10) @(negedge clk);
        sym_sum = 23'(model_pwr(ph, opt) + $urandom % 50);
        sym_vld = 1;
        syms++;
        @(negedge clk);
        sym_vld = 0;
      end
      repeat (2) @(negedge clk);
      checks += 3;
      if (circ(ph - opt) > 2) begin
        failures++;
        $display("opt %0d: final phase %0d, error %0d", opt, ph, circ(ph - opt));
      end
      if (moves != 4) begin failures++; $display("opt %0d: %0d moves", opt, moves); end
      if (syms != 20) begin failures++; $display("opt %0d: %0d symbols", opt, syms); end
      if (in_range) n_in_range++;
    end
    // both decision branches must have been taken
    checks++;
    if (n_in_range == 0 || n_in_range == PHASE_RES) failures++;
    $display("in-range decisions: %0d of %0d", n_in_range, PHASE_RES);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
