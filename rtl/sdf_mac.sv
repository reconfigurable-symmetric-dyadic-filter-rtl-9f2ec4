// Multiply-accumulate (MAC) unit.
//
// An N x N signed multiplier (N = DATA_W = COEF_W = 9) feeds a 2N-bit product
// to an adder whose (2N+1)-bit sum is held in the accumulator register, as in
// the multiplier / adder / accumulator structure of the architecture. One
// product is accumulated per cycle while in_valid is high; in_first restarts
// the sum with the current product, in_last marks the final tap of a
// convolution.
//
// Timing: the product of the operands presented in cycle t is in the
// accumulator after the clock edge ending cycle t. When that edge accumulated
// a tap marked in_last, out_valid is high for the following cycle and y holds
// the finished filter output: the accumulator (a Q.7 fixed-point value)
// rounded to the nearest integer and saturated to OUT_W bits; sat flags a
// clipped result and acc gives the unrounded sum. A new convolution may start
// in that same cycle, so back-to-back filters run without a gap. Rounding and
// saturation of the output are this design's choice.
//
// Range: the (2N+1)-bit accumulator does not wrap for any convolution the
// engine runs; the largest is the CDF 9/7 high-pass, whose absolute
// coefficient sum is 332/128, on samples of magnitude up to 256, giving at
// most 84992 against a limit of 2^18 = 262144.
module sdf_mac
  import sdf_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  logic    in_last,
  input  sample_t sample,
  input  coef_t   coef,
  output logic    out_valid,
  output out_t    y,
  output logic    sat,
  output logic signed [ACC_W-1:0] acc
);

  logic signed [PROD_W-1:0] prod;
  logic signed [ACC_W-1:0]  sum;

  always_comb begin
    prod = sample * coef;
    sum  = (in_first ? ACC_W'(0) : acc) + ACC_W'(prod);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
    end else begin
      if (in_valid) acc <= sum;
      out_valid <= in_valid && in_last;
    end
  end

  always_comb begin
    y   = round_sat(acc);
    sat = will_saturate(acc);
  end

endmodule
