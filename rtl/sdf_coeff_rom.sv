// Filter coefficient ROM.
//
// Holds the analysis low-pass (LoD) and high-pass (HiD) coefficients of every
// selectable mother wavelet. Because each filter is symmetric only the centre
// tap and one side are stored: the word at {wavelet, band, m} is the
// coefficient of the taps at offsets -m and +m from the filter centre, which
// halves the storage and lets the controller address a tap by its distance
// from the centre. Unused words (m beyond the filter end) read as zero.
//
// The ROM contents come from sdf_pkg::coef_value and are fixed at elaboration.
// Read is synchronous: with rd_en high at a clock edge, the addressed word
// appears on coef one cycle later and holds until the next enabled read.
// Storing the coefficients in a ROM addressed by the controller follows the
// architecture; the mirrored half-filter layout is this design's choice.
module sdf_coeff_rom
  import sdf_pkg::*;
#(
  parameter int unsigned M_W = HALF_AW   // bits of the tap distance m
) (
  input  logic     clk,
  input  logic     rd_en,
  input  wavelet_e wavelet,
  input  band_e    band,
  input  logic [M_W-1:0] m,
  output coef_t    coef
);

  localparam int unsigned DEPTH = 4 << M_W;

  typedef coef_t rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int unsigned a = 0; a < DEPTH; a++) begin
      r[a] = coef_value(wavelet_e'(a[M_W+1]), band_e'(a[M_W]), a % (1 << M_W));
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  always_ff @(posedge clk) begin
    if (rd_en) coef <= ROM[{wavelet, band, m}];
  end

endmodule
