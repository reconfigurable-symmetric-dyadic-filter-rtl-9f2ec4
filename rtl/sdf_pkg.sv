// Shared types and constants of the symmetric dyadic filter (SDF) wavelet engine.
//
// The engine decomposes a signal with a symmetric biorthogonal wavelet filter
// bank. Every filter is odd-length and symmetric about its centre tap, so only
// the centre tap and one side are stored: coefficient c(|m|) multiplies the
// samples at offset -m and +m from the centre. Coefficients are signed Q2.7
// numbers (value = integer / 128) held in COEF_W = 9 bits.
//
// Two mother wavelets are provided; the choice of these two, their rounding
// and their scaling is this design's own, as the filter values are not fixed by
// the architecture:
//   WV_LEGALL53  LeGall 5/3   low  = [-1 2 6 2 -1]/8, high = [-1 2 -1]/2
//   WV_CDF97     CDF 9/7      low  = JPEG2000 irreversible analysis low-pass
//                             high = JPEG2000 irreversible analysis high-pass
// The 9/7 values are rounded to 1/128; the centre taps are trimmed by one
// LSB so the low-pass DC gain is exactly 1 and the high-pass DC gain is 0.
//
// Sample alignment: the low-pass output n is centred on input sample 2n, the
// high-pass output n on sample 2n+1. Signal ends use whole-sample symmetric
// extension, x[-i] = x[i] and x[L-1+i] = x[L-1-i].
package sdf_pkg;

  localparam int unsigned IN_W     = 8;   // external sample width (p0[7:0])
  localparam int unsigned DATA_W   = 9;   // N: multiplier operand width
  localparam int unsigned COEF_W   = 9;   // coefficient width, = N
  localparam int unsigned FRAC_W   = 7;   // coefficient fraction bits
  localparam int unsigned OUT_W    = 9;   // coefficient output width (Filter_out[8:0])
  localparam int unsigned PROD_W   = DATA_W + COEF_W;   // 2N
  localparam int unsigned ACC_W    = PROD_W + 1;        // 2N+1
  localparam int unsigned MAX_HALF = 4;   // largest filter half-length (9 taps)
  localparam int unsigned HALF_AW  = 3;   // bits to address 0..MAX_HALF

  typedef enum logic {
    WV_LEGALL53 = 1'b0,
    WV_CDF97    = 1'b1
  } wavelet_e;

  typedef enum logic {
    BAND_LO = 1'b0,   // approximation (low-pass, LoD)
    BAND_HI = 1'b1    // detail (high-pass, HiD)
  } band_e;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [OUT_W-1:0]  out_t;

  // Half-length K of a filter: it has 2K+1 taps at offsets -K..K.
  function automatic int unsigned half_len(wavelet_e wv, band_e band);
    case ({wv, band})
      {WV_LEGALL53, BAND_LO}: return 2;
      {WV_LEGALL53, BAND_HI}: return 1;
      {WV_CDF97,    BAND_LO}: return 4;
      default:                return 3;
    endcase
  endfunction

  // Coefficient at distance m from the centre tap (0 beyond the filter end).
  function automatic coef_t coef_value(wavelet_e wv, band_e band, int unsigned m);
    coef_t c;
    c = '0;
    case ({wv, band})
      {WV_LEGALL53, BAND_LO}:
        case (m)
          0: c = 9'sd96;
          1: c = 9'sd32;
          2: c = -9'sd16;
          default: c = '0;
        endcase
      {WV_LEGALL53, BAND_HI}:
        case (m)
          0: c = 9'sd128;
          1: c = -9'sd64;
          default: c = '0;
        endcase
      {WV_CDF97, BAND_LO}:
        case (m)
          0: c = 9'sd78;
          1: c = 9'sd34;
          2: c = -9'sd10;
          3: c = -9'sd2;
          4: c = 9'sd3;
          default: c = '0;
        endcase
      default:
        case (m)
          0: c = 9'sd142;
          1: c = -9'sd76;
          2: c = -9'sd7;
          3: c = 9'sd12;
          default: c = '0;
        endcase
    endcase
    return c;
  endfunction

  // Words of coefficient RAM for a LEN-sample signal decomposed to at most
  // max_levels levels: the result area plus the scratch areas of the
  // intermediate approximations (LEN/2 for level 1, LEN/4 for level 2).
  function automatic int unsigned ram_depth(int unsigned len, int unsigned max_levels);
    if (max_levels <= 1) return len;
    if (max_levels == 2) return len + len / 2;
    return len + len / 2 + len / 4;
  endfunction

  localparam logic signed [ACC_W:0] OUT_MAX = (ACC_W+1)'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W:0] OUT_MIN = -OUT_MAX - 1;

  // Round an accumulator (Q.FRAC_W) to the nearest integer, halves rounded
  // up (add half, arithmetic shift), then saturate to OUT_W bits.
  function automatic out_t round_sat(logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W:0] r;
    r = ($signed({acc[ACC_W-1], acc}) + $signed((ACC_W+1)'(1 << (FRAC_W - 1)))) >>> FRAC_W;
    if (r > OUT_MAX)      return out_t'(OUT_MAX);
    else if (r < OUT_MIN) return out_t'(OUT_MIN);
    else               return out_t'(r);
  endfunction

  // True when round_sat would clip the value.
  function automatic logic will_saturate(logic signed [ACC_W-1:0] acc);
    logic signed [ACC_W:0] r;
    r = ($signed({acc[ACC_W-1], acc}) + $signed((ACC_W+1)'(1 << (FRAC_W - 1)))) >>> FRAC_W;
    return (r > OUT_MAX) || (r < OUT_MIN);
  endfunction

endpackage
