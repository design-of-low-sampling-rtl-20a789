// barker_correlator: the PN correlator of the DSSS receiver at one sample per
// chip.
//
// The last 11 chip samples (taps 10..0 of the shared shift register, tap 10
// the oldest and matched to the first Barker chip) are multiplied by the
// Barker code. As in the architecture, the multiplication by +-1 is done with
// XORs: a -1 chip inverts the sample bits, and the missing +1 of the two's
// complement negations is added once as the constant count of -1 chips. The
// I and Q sums are squared through a look-up table of n*n indexed by the
// magnitude, and the two squares are added: pwr = Re(r.B)^2 + Im(r.B)^2.
//
// Interface: tap_vld marks a cycle in which the taps hold a new sample;
// pwr/pwr_vld follow one clock later (one register stage).
module barker_correlator
  import ts_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    tap_vld,
  input  sample_t taps_i [SPS],
  input  sample_t taps_q [SPS],
  output pwr_t    pwr,
  output logic    pwr_vld
);

  localparam int CW = ADC_W + 4;          // 11 terms need 4 more bits
  localparam int AW = CW - 1;             // magnitude index width
  localparam int SW = 2 * AW;             // square width
  localparam int NUM_NEG = $countones(BARKER_NEG);

  typedef logic [SW-1:0] sq_t;
  typedef logic [2**AW-1:0][SW-1:0] sq_rom_t;

  function automatic sq_rom_t make_sq_rom();
    sq_rom_t rom;
    for (int n = 0; n < 2**AW; n++) rom[n] = SW'(n * n);
    return rom;
  endfunction

  localparam sq_rom_t SQ_ROM = make_sq_rom();

  logic signed [CW-1:0] corr_i, corr_q;
  logic [AW-1:0] mag_i, mag_q;

  always_comb begin
    corr_i = CW'(NUM_NEG);
    corr_q = CW'(NUM_NEG);
    for (int n = 0; n < SPS; n++) begin
      corr_i += CW'(sample_t'(taps_i[SPS-1-n] ^ {ADC_W{BARKER_NEG[n]}}));
      corr_q += CW'(sample_t'(taps_q[SPS-1-n] ^ {ADC_W{BARKER_NEG[n]}}));
    end
    mag_i = corr_i[CW-1] ? AW'(-corr_i) : AW'(corr_i);
    mag_q = corr_q[CW-1] ? AW'(-corr_q) : AW'(corr_q);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pwr     <= '0;
      pwr_vld <= 1'b0;
    end else begin
      pwr_vld <= tap_vld;
      if (tap_vld) pwr <= PWR_W'(SQ_ROM[mag_i]) + PWR_W'(SQ_ROM[mag_q]);
    end
  end

endmodule
