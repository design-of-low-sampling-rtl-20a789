// symbol_window: the correlator-output select window of the DSSS timing loop.
//
// A chip counter (0..SPS-1) advances with every correlator output. The window
// runs from PRE chips before the symbol boundary to POST chips after it, so
// the correlation peak sits one third into it (4 before, 6 after, 11 chips in
// all, as in the select-window figure and the -4..6 sum of the slope formula).
// When the last chip of the window arrives, the module presents the largest
// power in the window (sym_peak, the per-symbol peak power of the error
// function) and the sum over the window (sym_sum, the windowed power of the
// acquisition slope) with a one-cycle sym_vld strobe. A new window starts
// right after, so a gain change made on sym_vld lands on a window edge.
// A change of boundary drops the window in progress, so every reported
// window is complete.
//
// Interface: pwr/pwr_vld from the correlator, boundary = chip index of the
// expected peak; chip_idx is the index of the chip being accepted.
// Timing: sym_* are registered and valid the cycle after the window's last
// chip.
module symbol_window
  import ts_pkg::*;
#(
  parameter int PRE  = 4,
  parameter int POST = 6,
  parameter int SUM_W = PWR_W + 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  pwr_t             pwr,
  input  logic             pwr_vld,
  input  logic [3:0]       boundary,
  output logic [3:0]       chip_idx,
  output pwr_t             sym_peak,
  output logic [SUM_W-1:0] sym_sum,
  output logic             sym_vld
);

  logic [3:0] offset;
  logic       in_win, win_end;
  pwr_t       run_max;
  logic [SUM_W-1:0] run_sum;
  logic       win_open;
  logic [3:0] bnd_q;

  always_comb begin
    offset  = (chip_idx >= boundary) ? chip_idx - boundary
                                     : chip_idx + 4'(SPS) - boundary;
    in_win  = (offset <= 4'(POST)) || (offset >= 4'(SPS - PRE));
    win_end = pwr_vld && (offset == 4'(POST));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chip_idx <= '0;
      run_max  <= '0;
      run_sum  <= '0;
      win_open <= 1'b0;
      bnd_q    <= '0;
      sym_peak <= '0;
      sym_sum  <= '0;
      sym_vld  <= 1'b0;
    end else begin
      sym_vld <= 1'b0;
      bnd_q   <= boundary;
      if (pwr_vld)
        chip_idx <= (chip_idx == 4'(SPS - 1)) ? '0 : chip_idx + 1'b1;
      if (boundary != bnd_q) begin
        // a new boundary invalidates the window in progress
        win_open <= 1'b0;
      end else if (pwr_vld) begin
        if (win_end) begin
          // a window that opened after reset is only reported once complete
          sym_peak <= (win_open && run_max > pwr) ? run_max : pwr;
          sym_sum  <= (win_open ? run_sum : '0) + SUM_W'(pwr);
          sym_vld  <= win_open;
          run_max  <= '0;
          run_sum  <= '0;
          win_open <= 1'b0;
        end else if (in_win) begin
          if (offset == 4'(SPS - PRE)) begin
            win_open <= 1'b1;
            run_max  <= pwr;
            run_sum  <= SUM_W'(pwr);
          end else begin
            if (pwr > run_max) run_max <= pwr;
            run_sum <= run_sum + SUM_W'(pwr);
          end
        end
      end
    end
  end

endmodule
