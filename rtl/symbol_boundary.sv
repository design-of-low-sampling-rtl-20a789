// symbol_boundary: symbol boundary check of the DSSS receiver.
//
// The algorithm only names this step (it runs after packet detection and
// again after timing acquisition, so that AGC updates fall on symbol edges);
// the method here is this design's own and the simplest one that does the
// job: after a start pulse, the correlator power of every chip position
// (chip_idx 0..SPS-1) is accumulated over NSYM symbols, and the position with
// the largest total becomes the new boundary, i.e. the chip index at which
// the Barker correlation peaks. The boundary holds until the next check.
//
// Interface: start (one cycle) begins a check; busy is high while it runs;
// done pulses for one cycle with boundary valid. A check takes NSYM*SPS
// correlator outputs plus one clock.
module symbol_boundary
  import ts_pkg::*;
#(
  parameter int NSYM = 4,
  parameter int ACC_W = PWR_W + 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  pwr_t       pwr,
  input  logic       pwr_vld,
  input  logic [3:0] chip_idx,
  output logic [3:0] boundary,
  output logic       busy,
  output logic       done
);

  logic [ACC_W-1:0] acc [SPS];
  logic [7:0]       cnt;
  logic             finish;
  logic [3:0]       best;

  always_comb begin
    best = '0;
    for (int p = 1; p < SPS; p++)
      if (acc[p] > acc[best]) best = 4'(p);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int p = 0; p < SPS; p++) acc[p] <= '0;
      cnt      <= '0;
      busy     <= 1'b0;
      finish   <= 1'b0;
      done     <= 1'b0;
      boundary <= '0;
    end else begin
      done   <= 1'b0;
      finish <= 1'b0;
      if (start) begin
        for (int p = 0; p < SPS; p++) acc[p] <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy && pwr_vld) begin
        acc[chip_idx] <= acc[chip_idx] + ACC_W'(pwr);
        if (cnt == 8'(NSYM * SPS - 1)) begin
          busy   <= 1'b0;
          finish <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
      if (finish) begin
        boundary <= best;
        done     <= 1'b1;
      end
    end
  end

endmodule
