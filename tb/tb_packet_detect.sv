// tb_packet_detect: noise-like symbols (peak about twice the mean) must not
// trigger the detector; Barker-like symbols (one strong chip) must trigger it
// on exactly the third consecutive one; an interruption restarts the count;
// en low blocks detection.
module tb_packet_detect;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, sym_vld = 0;
  pwr_t sym_peak = '0;
  logic [22:0] sym_sum = '0;
  logic det;
  int checks = 0, failures = 0, dets = 0;

  packet_detect dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (det) dets++;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic symbol(input bit barker);
    int peak, sum;
    if (barker) begin peak = 17000 + $urandom % 1000; sum = peak + 10 * 150; end
    else begin peak = 2000 + $urandom % 500; sum = 11 * 1000; end
    @(negedge clk);
    sym_peak = pwr_t'(peak);
    sym_sum = 23'(sum);
    sym_vld = 1;
    @(negedge clk);
    sym_vld = 0;
    repeat (3) @(negedge clk);
  endtask

  task automatic expect_dets(input int n, input string what);
    checks++;
    if (dets != n) begin
      failures++;
      $display("%s: dets=%0d expected %0d", what, dets, n);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    en = 1;
    repeat (50) symbol(0);
    expect_dets(0, "noise");
    symbol(1); symbol(1);
    expect_dets(0, "two barker symbols");
    symbol(1);
    expect_dets(1, "third barker symbol");
    symbol(1); symbol(0); symbol(1); symbol(1);
    expect_dets(1, "interrupted run");
    symbol(1);
    expect_dets(2, "new run of three");
    en = 0;
    repeat (6) symbol(1);
    expect_dets(2, "disabled");
    en = 1;
    @(negedge clk);
    sym_peak = '0; sym_sum = '0;
    repeat (4) begin sym_vld = 1; @(negedge clk); sym_vld = 0; @(negedge clk); end
    expect_dets(2, "zero power");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
