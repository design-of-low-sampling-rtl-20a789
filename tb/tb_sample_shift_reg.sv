// tb_sample_shift_reg: pushes random I/Q samples, with gaps in in_vld, into
// the shared shift register and compares every tap with a reference history
// kept in the testbench.
module tb_sample_shift_reg;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, in_vld = 0;
  sample_t in_i = '0, in_q = '0;
  sample_t taps_i [16], taps_q [16];
  sample_t hist_i [16], hist_q [16];
  int checks = 0, failures = 0;

  sample_shift_reg dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 16; k++) begin hist_i[k] = '0; hist_q[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      in_vld = ($urandom % 4) != 0;
      in_i = sample_t'($urandom);
      in_q = sample_t'($urandom);
      if (in_vld) begin
        for (int k = 15; k > 0; k--) begin hist_i[k] = hist_i[k-1]; hist_q[k] = hist_q[k-1]; end
        hist_i[0] = in_i; hist_q[0] = in_q;
      end
      @(posedge clk); #1;
      for (int k = 0; k < 16; k++) begin
        checks++;
        if (taps_i[k] != hist_i[k] || taps_q[k] != hist_q[k]) begin
          failures++;
          if (failures < 5) $display("tap %0d mismatch at t=%0d", k, t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
