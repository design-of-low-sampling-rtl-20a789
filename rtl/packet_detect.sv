// packet_detect: flags the arrival of a DSSS packet.
//
// The algorithm names packet detection as the first receiver step but does
// not specify it, so this is a simple detector of the design's own: a symbol
// counts as a hit when its windowed peak power stands out from the window's
// mean, peak * SPS > THR * sum, and is above the floor MIN_PWR. HITS
// consecutive hits raise det for one cycle. A Barker-spread preamble gives a
// peak-to-mean ratio near 10; noise gives about 2-3.
//
// Interface: en gates the detector (cleared count when low); sym_peak,
// sym_sum and sym_vld come from the select window. det is registered and
// pulses on the clock after the HITS-th consecutive hit.
module packet_detect
  import ts_pkg::*;
#(
  parameter int SUM_W   = PWR_W + 4,
  parameter int THR     = 4,
  parameter int HITS    = 3,
  parameter int MIN_PWR = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  pwr_t             sym_peak,
  input  logic [SUM_W-1:0] sym_sum,
  input  logic             sym_vld,
  output logic             det
);

  logic [3:0] hits;
  logic       hit;

  always_comb
    hit = (sym_peak > pwr_t'(MIN_PWR)) &&
          ((SUM_W + 4)'(sym_peak) * (SUM_W + 4)'(SPS) >
           (SUM_W + 4)'(sym_sum) * (SUM_W + 4)'(THR));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hits <= '0;
      det  <= 1'b0;
    end else begin
      det <= 1'b0;
      if (!en) begin
        hits <= '0;
      end else if (sym_vld) begin
        if (!hit) begin
          hits <= '0;
        end else if (hits == 4'(HITS - 1)) begin
          hits <= '0;
          det  <= 1'b1;
        end else begin
          hits <= hits + 1'b1;
        end
      end
    end
  end

endmodule
