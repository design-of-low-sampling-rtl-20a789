// sample_shift_reg: the 16-element shift register that holds the latest ADC
// I/Q samples and is shared by the DSSS, CCK and OFDM timing units.
//
// Each accepted sample (in_vld high) enters at tap 0 and every older sample
// moves one tap along, so tap k holds the sample taken k samples earlier.
// The depth of 16 follows the architecture; the taps are registered and
// cleared by the synchronous active-low reset (a choice of this design).
// Interface: in_vld/in_i/in_q in, taps_i/taps_q out, valid one cycle after
// the sample is presented.
module sample_shift_reg
  import ts_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_vld,
  input  sample_t in_i,
  input  sample_t in_q,
  output sample_t taps_i [DEPTH],
  output sample_t taps_q [DEPTH]
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int k = 0; k < DEPTH; k++) begin
        taps_i[k] <= '0;
        taps_q[k] <= '0;
      end
    end else if (in_vld) begin
      taps_i[0] <= in_i;
      taps_q[0] <= in_q;
      for (int k = 1; k < DEPTH; k++) begin
        taps_i[k] <= taps_i[k-1];
        taps_q[k] <= taps_q[k-1];
      end
    end
  end

endmodule
