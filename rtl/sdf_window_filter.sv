// Parallel symmetric 9-tap window filter.
//
// Computes one wavelet filter output from a window of nine 8-bit samples
// p[0]..p[8] in a single combinational pass, giving the 9-bit Filter_out:
//
//   Filter_out = round_sat( c0*p[4] + sum_{m=1..4} c_m * (p[4-m] + p[4+m]) )
//
// where c_m are the Q2.7 coefficients of the selected wavelet and band,
// taken from the same table as the coefficient ROM (shorter filters have
// zero outer coefficients). Because the filter is symmetric the two samples
// that share a coefficient are added first, so five multipliers do the work
// of nine. The result is rounded to an integer and saturated to a signed
// 9-bit value, as in the MAC unit.
//
// This is the fully parallel form of the filter that the sequential engine
// evaluates tap by tap; the window ports p0..p8 of 8 bits, the 9-bit output
// and the purely combinational path from inputs to output follow the
// architecture's reported implementation. The coefficient values, the
// pre-adder structure and the rounding are this design's choices.
module sdf_window_filter
  import sdf_pkg::*;
(
  input  wavelet_e        wavelet,
  input  band_e           band,
  input  logic [IN_W-1:0] p [9],
  output out_t            filter_out
);

  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] pair;   // p[4-m] + p[4+m], non-negative
  logic signed [ACC_W-1:0] c;

  always_comb begin
    c   = ACC_W'(coef_value(wavelet, band, 0));
    acc = c * $signed(ACC_W'(p[4]));
    for (int m = 1; m <= 4; m++) begin
      c    = ACC_W'(coef_value(wavelet, band, m));
      pair = $signed(ACC_W'(p[4 - m])) + $signed(ACC_W'(p[4 + m]));
      acc  = acc + c * pair;
    end
    filter_out = round_sat(acc);
  end

endmodule
