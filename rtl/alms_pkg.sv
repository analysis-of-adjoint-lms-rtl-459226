// alms_pkg - shared types, formats and helper functions of the adjoint-LMS
// (ALMS) noise canceller.
//
// Number formats. Every sample on a datapath wire (data1, data2, the filter
// outputs, the error, the filtered error, the step term) is a 16-bit signed
// two's-complement fraction, Q1.15. Filter coefficients are 16-bit Q2.14 so that
// a tap may reach +/-2. The adaptive weights are accumulated in 32-bit Q2.30 and
// the filter uses their upper 16 bits, rounded. The 16-bit sample width is the
// one stated for the design (16 kbit/s at 1 kS/s, 16-bit buses); the Q formats,
// rounding and saturation are this design's own choices.
package alms_pkg;

  localparam int unsigned DATA_W    = 16;  // sample width
  localparam int unsigned COEF_W    = 16;  // filter coefficient width
  localparam int unsigned COEF_FRAC = 14;  // fractional bits of a coefficient (Q2.14)
  localparam int unsigned WACC_W    = 32;  // adaptive weight accumulator width (Q2.30)
  localparam int unsigned WACC_FRAC = 30;

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [WACC_W-1:0] wacc_t;

  localparam sample_t SAMPLE_MAX = sample_t'(16'sh7FFF);
  localparam sample_t SAMPLE_MIN = sample_t'(16'sh8000);

  // Default secondary-path model: four taps 0.5, 0.25, -0.125, 0.0625 in Q2.14,
  // tap 0 in the lowest 16 bits. Minimum phase, so the adaptive controller can
  // reach the Wiener solution W = P/S.
  localparam int unsigned S_TAPS_DEF = 4;
  localparam logic [S_TAPS_DEF*COEF_W-1:0] S_COEF_DEF =
      {16'sd1024, -16'sd2048, 16'sd4096, 16'sd8192};

  // Saturate a wide signed value to a Q1.15 sample.
  function automatic sample_t sat_sample(input logic signed [63:0] v);
    if (v > 64'sd32767)       return SAMPLE_MAX;
    else if (v < -64'sd32768) return SAMPLE_MIN;
    else                      return sample_t'(v);
  endfunction

  // True when sat_sample(v) would clip.
  function automatic logic clips(input logic signed [63:0] v);
    return (v > 64'sd32767) || (v < -64'sd32768);
  endfunction

  // Arithmetic right shift by sh with round-half-up.
  function automatic logic signed [63:0] round_shift(input logic signed [63:0] v,
                                                      input int unsigned sh);
    if (sh == 0) return v;
    return (v + (64'sd1 <<< (sh - 1))) >>> sh;
  endfunction

endpackage
