// tb_barker_correlator: random and Barker-matched chip windows; the power is
// compared with |sum(b_n * r_n)|^2 computed with integer multiplies in the
// testbench (b = +1 +1... the 802.11b Barker code written out here). Also
// checks the one-clock latency of pwr_vld.
module tb_barker_correlator;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, tap_vld = 0;
  sample_t taps_i [11], taps_q [11];
  pwr_t pwr;
  logic pwr_vld;
  int checks = 0, failures = 0;
  int barker [11] = '{1, -1, 1, 1, -1, 1, 1, 1, -1, -1, -1};

  barker_correlator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_pwr();
    int si = 0, sq = 0;
    for (int n = 0; n < 11; n++) begin
      si += barker[n] * int'(taps_i[10-n]);
      sq += barker[n] * int'(taps_q[10-n]);
    end
    return si * si + sq * sq;
  endfunction

  initial begin
    int exp_p;
    for (int n = 0; n < 11; n++) begin taps_i[n] = '0; taps_q[n] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      case (t % 4)
        0: for (int n = 0; n < 11; n++) begin   // aligned Barker, full scale
             taps_i[10-n] = sample_t'(barker[n] * ((t % 8 == 0) ? 31 : -32));
             taps_q[10-n] = sample_t'(barker[n] * ((t % 8 == 0) ? -32 : 31));
           end
        default: for (int n = 0; n < 11; n++) begin
             taps_i[n] = sample_t'($urandom);
             taps_q[n] = sample_t'($urandom);
           end
      endcase
      exp_p = ref_pwr();
      tap_vld = 1;
      @(posedge clk); #1;
      tap_vld = 0;
      checks++;
      if (!pwr_vld || int'(pwr) != exp_p) begin
        failures++;
        if (failures < 5) $display("t=%0d pwr=%0d exp=%0d vld=%0b", t, pwr, exp_p, pwr_vld);
      end
      @(posedge clk); #1;
      checks++;
      if (pwr_vld) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
