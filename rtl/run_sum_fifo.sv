// run_sum_fifo: running sum of the last LEN values, built as a FIFO plus an
// accumulator with one three-input adder (sum + newest - oldest) instead of a
// LEN-input adder, as in the tracking architecture.
//
// push adds din and drops the value pushed LEN pushes ago (zero until the
// FIFO has filled). full rises once LEN values have been pushed. clear
// empties FIFO and sum. sum is registered: it includes a push one clock
// after it.
module run_sum_fifo #(
  parameter int LEN   = 16,
  parameter int W     = 19,
  parameter int SUM_W = W + $clog2(LEN)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             push,
  input  logic [W-1:0]     din,
  output logic [SUM_W-1:0] sum,
  output logic             full
);

  logic [W-1:0] mem [LEN];
  logic [$clog2(LEN)-1:0] wp;
  logic [$clog2(LEN+1)-1:0] cnt;
  logic [W-1:0] oldest;

  assign oldest = (cnt == ($clog2(LEN+1))'(LEN)) ? mem[wp] : '0;
  assign full   = (cnt == ($clog2(LEN+1))'(LEN));

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      wp  <= '0;
      cnt <= '0;
      sum <= '0;
      for (int i = 0; i < LEN; i++) mem[i] <= '0;
    end else if (push) begin
      mem[wp] <= din;
      wp  <= (wp == ($clog2(LEN))'(LEN - 1)) ? '0 : wp + 1'b1;
      if (!full) cnt <= cnt + 1'b1;
      sum <= sum + SUM_W'(din) - SUM_W'(oldest);
    end
  end

endmodule
