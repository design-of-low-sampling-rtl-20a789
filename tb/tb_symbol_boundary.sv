// tb_symbol_boundary: feeds correlator powers that peak at one chip position
// of every symbol (plus random lower powers elsewhere) and checks that the
// check returns that position, for every position, and that done comes
// NSYM*SPS powers after start.
module tb_symbol_boundary;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pwr_vld = 0;
  pwr_t pwr = '0;
  logic [3:0] chip_idx = '0, boundary;
  logic busy, done;
  int checks = 0, failures = 0;

  symbol_boundary dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int pos = 0; pos < 11; pos++) begin
      int n_pwr;
      @(negedge clk);
      start = 1;
      @(negedge clk);
      start = 0;
      n_pwr = 0;
      while (!done) begin
        @(negedge clk);
        if (done) break;
        pwr_vld = busy;
        if (busy) begin
          // peak position gets 10000 + noise, others noise up to 3000,
          // with one outlier symbol per check on another position
          if (chip_idx == 4'(pos)) pwr = pwr_t'(10000 + $urandom % 3000);
          else if (n_pwr == 3 && chip_idx == 4'((pos + 5) % 11)) pwr = pwr_t'(15000);
          else pwr = pwr_t'($urandom % 3000);
          n_pwr++;
        end
        @(posedge clk);
        if (pwr_vld) chip_idx <= (chip_idx == 10) ? 0 : chip_idx + 1;
        #1 pwr_vld = 0;
      end
      checks += 2;
      if (boundary != 4'(pos)) begin
        failures++;
        $display("pos %0d got %0d", pos, boundary);
      end
      if (n_pwr != 4 * 11) begin
        failures++;
        $display("pos %0d took %0d powers", pos, n_pwr);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
