// cck_fwt: largest CCK codeword correlation power per 8-chip CCK symbol,
// the quantity the CCK tracker and the CCK AGC work on.
//
// The algorithm uses the maximum output power of the fast Walsh transform
// (FWT) of the CCK demodulator without describing the demodulator; this
// block is the simplest complete one, written for this design. A CCK
// codeword (802.11b) is
//   c = e^{j p1} * { e^{j(p2+p3+p4)}, e^{j(p3+p4)}, e^{j(p2+p4)}, -e^{j p4},
//                    e^{j(p2+p3)},    e^{j p3},     -e^{j p2},   1 }
// with p2..p4 in {0, 90, 180, 270} degrees. The correlation with the received
// chips r0..r7 is split the FWT way into two halves over (p2, p3),
//   A = r0 e^{-j(p2+p3)} + r1 e^{-j p3} + r2 e^{-j p2} - r3
//   B = r4 e^{-j(p2+p3)} + r5 e^{-j p3} - r6 e^{-j p2} + r7
// and combined as A e^{-j p4} + B for the four p4: 64 correlations in all,
// using only swaps and negations. p1 only rotates the result and does not
// change its power. The output is the largest |.|^2 of the 64.
//
// Interface: start marks that the next accepted chip is the first chip of a
// CCK symbol (symbol timing comes from the PLCP header end); tap_vld marks
// new taps of the shared shift register, tap 7 the oldest. fwt_pwr/fwt_vld
// follow one clock after the eighth chip of each symbol.
module cck_fwt
  import ts_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    tap_vld,
  input  sample_t taps_i [8],
  input  sample_t taps_q [8],
  output pwr_t    fwt_pwr,
  output logic    fwt_vld
);

  localparam int CW = ADC_W + 4;

  typedef struct packed {
    logic signed [CW-1:0] re;
    logic signed [CW-1:0] im;
  } cplx_t;

  // multiply by e^{-j k 90deg}
  function automatic cplx_t rot(input cplx_t x, input logic [1:0] k);
    cplx_t y;
    unique case (k)
      2'd0: y = x;
      2'd1: begin y.re =  x.im; y.im = -x.re; end
      2'd2: begin y.re = -x.re; y.im = -x.im; end
      default: begin y.re = -x.im; y.im =  x.re; end
    endcase
    return y;
  endfunction

  function automatic cplx_t add(input cplx_t a, input cplx_t b);
    cplx_t y;
    y.re = a.re + b.re;
    y.im = a.im + b.im;
    return y;
  endfunction

  function automatic cplx_t sub(input cplx_t a, input cplx_t b);
    cplx_t y;
    y.re = a.re - b.re;
    y.im = a.im - b.im;
    return y;
  endfunction

  cplx_t r [8];
  pwr_t  best;

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      r[n].re = CW'(taps_i[7-n]);
      r[n].im = CW'(taps_q[7-n]);
    end
    best = '0;
    for (int q2 = 0; q2 < 4; q2++) begin
      for (int q3 = 0; q3 < 4; q3++) begin
        cplx_t a, b, c;
        a = sub(add(add(rot(r[0], 2'(q2 + q3)), rot(r[1], 2'(q3))), rot(r[2], 2'(q2))), r[3]);
        b = add(sub(add(rot(r[4], 2'(q2 + q3)), rot(r[5], 2'(q3))), rot(r[6], 2'(q2))), r[7]);
        for (int q4 = 0; q4 < 4; q4++) begin
          pwr_t p;
          c = add(rot(a, 2'(q4)), b);
          p = PWR_W'(c.re * c.re) + PWR_W'(c.im * c.im);
          if (p > best) best = p;
        end
      end
    end
  end

  logic [2:0] chip;
  logic       active;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      chip    <= '0;
      active  <= 1'b0;
      fwt_pwr <= '0;
      fwt_vld <= 1'b0;
    end else begin
      fwt_vld <= 1'b0;
      if (start) begin
        chip   <= '0;
        active <= 1'b1;
      end else if (tap_vld && active) begin
        chip <= chip + 1'b1;
        if (chip == 3'd7) begin
          fwt_pwr <= best;
          fwt_vld <= 1'b1;
        end
      end
    end
  end

endmodule
