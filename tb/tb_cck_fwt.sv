// tb_cck_fwt: CCK symbols built from random phases (p1..p4) and random
// amplitudes, and symbols of random chips, are shifted in one chip at a
// time. Each output is compared with a brute-force search over all 64
// codewords written directly from the 802.11b codeword formula (cos/sin of
// multiples of 90 degrees), and a clean codeword must give exactly (8A)^2.
module tb_cck_fwt;
  import ts_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, tap_vld = 0;
  sample_t taps_i [8], taps_q [8];
  pwr_t fwt_pwr;
  logic fwt_vld;
  int checks = 0, failures = 0, outs = 0;
  int ci [4] = '{1, 0, -1, 0};
  int si [4] = '{0, 1, 0, -1};
  int sym_re [8], sym_im [8];

  cck_fwt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exponent (in quarter turns) and sign of each codeword chip
  function automatic int chip_exp(input int n, input int p2, input int p3, input int p4);
    case (n)
      0: return p2 + p3 + p4;
      1: return p3 + p4;
      2: return p2 + p4;
      3: return p4 + 2;        // -e^{j p4}
      4: return p2 + p3;
      5: return p3;
      6: return p2 + 2;        // -e^{j p2}
      default: return 0;
    endcase
  endfunction

  function automatic int brute_max();
    int best = 0;
    for (int p2 = 0; p2 < 4; p2++)
      for (int p3 = 0; p3 < 4; p3++)
        for (int p4 = 0; p4 < 4; p4++) begin
          int re = 0, im = 0, p;
          for (int n = 0; n < 8; n++) begin
            int k = chip_exp(n, p2, p3, p4) % 4;
            re += sym_re[n] * ci[k] + sym_im[n] * si[k];
            im += sym_im[n] * ci[k] - sym_re[n] * si[k];
          end
          p = re * re + im * im;
          if (p > best) best = p;
        end
    return best;
  endfunction

  initial begin
    for (int n = 0; n < 8; n++) begin taps_i[n] = '0; taps_q[n] = '0; end
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    for (int s = 0; s < 300; s++) begin
      int expv, amp, wait_cyc;
      bit clean;
      clean = (s % 2) == 0;
      amp = 4 + $urandom % 28;
      if (clean) begin
        int p1, p2, p3, p4, k;
        p1 = $urandom % 4; p2 = $urandom % 4; p3 = $urandom % 4; p4 = $urandom % 4;
        for (int n = 0; n < 8; n++) begin
          k = (chip_exp(n, p2, p3, p4) + p1) % 4;
          sym_re[n] = amp * ci[k];
          sym_im[n] = amp * si[k];
        end
      end else begin
        for (int n = 0; n < 8; n++) begin
          sym_re[n] = int'(sample_t'($urandom));
          sym_im[n] = int'(sample_t'($urandom));
        end
      end
      expv = brute_max();
      for (int n = 0; n < 8; n++) begin
        @(negedge clk);
        for (int k = 7; k > 0; k--) begin taps_i[k] = taps_i[k-1]; taps_q[k] = taps_q[k-1]; end
        taps_i[0] = sample_t'(sym_re[n]);
        taps_q[0] = sample_t'(sym_im[n]);
        tap_vld = 1;
        @(negedge clk);
        tap_vld = 0;
        checks++;
        if (fwt_vld != (n == 7)) begin
          failures++;
          $display("sym %0d chip %0d: fwt_vld=%0b", s, n, fwt_vld);
        end
        wait_cyc = $urandom % 3;
        repeat (wait_cyc) @(negedge clk);
      end
      checks++;
      if (int'(fwt_pwr) != expv || (clean && expv != 64 * amp * amp)) begin
        failures++;
        if (failures < 6) $display("sym %0d clean=%0b: fwt %0d expected %0d", s, clean, fwt_pwr, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
