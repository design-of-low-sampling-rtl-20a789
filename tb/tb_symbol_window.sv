// tb_symbol_window: streams random correlator powers for several boundary
// settings and compares each window's peak and sum with values computed from
// the same stream in the testbench (window = boundary-4 .. boundary+6).
module tb_symbol_window;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, pwr_vld = 0;
  pwr_t pwr = '0;
  logic [3:0] boundary = '0, chip_idx;
  pwr_t sym_peak;
  logic [22:0] sym_sum;
  logic sym_vld;
  int checks = 0, failures = 0;
  pwr_t stream [$];
  int chip_of [$];

  symbol_window dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: the window ends at chip (boundary + 6) mod 11 and covers the
  // 11 powers up to and including it
  int n_win = 0;
  always @(posedge clk) begin
    if (rst_n && sym_vld) begin
      int exp_max, exp_sum, last;
      exp_max = 0; exp_sum = 0;
      last = stream.size() - 1;
      for (int i = 0; i < 11; i++) begin
        int p;
        p = int'(stream[last - i]);
        exp_sum += p;
        if (p > exp_max) exp_max = p;
      end
      checks += 3;
      if (int'(sym_peak) != exp_max) failures++;
      if (int'(sym_sum) != exp_sum) failures++;
      if (chip_of[last] != (int'(boundary) + 6) % 11) failures++;
      if ((int'(sym_peak) != exp_max || int'(sym_sum) != exp_sum) && failures < 4)
        $display("win %0d peak %0d/%0d sum %0d/%0d", n_win, sym_peak, exp_max, sym_sum, exp_sum);
      n_win++;
    end
  end

  initial begin
    int cidx = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 11; b += 3) begin
      boundary = 4'(b);
      for (int t = 0; t < 11 * 12; t++) begin
        @(negedge clk);
        pwr_vld = 1;
        pwr = pwr_t'($urandom % 200000);
        stream.push_back(pwr);
        chip_of.push_back(cidx);
        cidx = (cidx + 1) % 11;
        @(negedge clk);
        pwr_vld = 0;
      end
    end
    repeat (4) @(posedge clk);
    checks++;
    if (n_win < 40) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
