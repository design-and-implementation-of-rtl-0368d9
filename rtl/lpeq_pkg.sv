// lpeq_pkg: types, widths and fixed-point helpers shared by the blocks of the
// linear-phase equalizer band processor.
//
// Audio samples are 16-bit two's complement, as on a CD (44.1 kHz, 16 bit).
// FIR coefficients are Q1.15. The modulation tables (sqrt2*cos, sqrt2*sin)
// and the band gain are Q2.14, because sqrt(2) and gains above one do not fit
// in Q1.15. Every product is rounded half-up at the end (add half an LSB,
// shift right arithmetically) and then saturated to the 16-bit sample range.
// The formats, the rounding and the saturation are choices of this design.
package lpeq_pkg;

  localparam int unsigned SAMPLE_W  = 16;  // audio word
  localparam int unsigned COEF_W    = 16;  // FIR coefficient word, Q1.15
  localparam int unsigned COEF_FRAC = 15;
  localparam int unsigned TAB_W     = 16;  // cos/sin table word, Q2.14
  localparam int unsigned TAB_FRAC  = 14;
  localparam int unsigned GAIN_W    = 16;  // band gain, Q2.14
  localparam int unsigned GAIN_FRAC = 14;
  localparam int unsigned ACC_W     = 40;  // FIR accumulator
  localparam int unsigned MAX_SLOT  = 8;   // filters per multiplier stage, at most

  localparam int unsigned MAX_BANDS = 16;  // bands of the equalizer, at most

  typedef int unsigned slot_arr_t [MAX_SLOT];
  typedef int unsigned band_arr_t [MAX_BANDS];  // one setting per band

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [TAB_W-1:0]    tab_t;
  typedef logic signed [ACC_W-1:0]    acc_t;

  localparam sample_t SAMPLE_MAX = sample_t'({1'b0, {(SAMPLE_W-1){1'b1}}});
  localparam sample_t SAMPLE_MIN = sample_t'({1'b1, {(SAMPLE_W-1){1'b0}}});

  // Saturate a wide signed value to the sample range.
  function automatic sample_t sat(input acc_t v);
    if (v > acc_t'(SAMPLE_MAX)) return SAMPLE_MAX;
    if (v < acc_t'(SAMPLE_MIN)) return SAMPLE_MIN;
    return sample_t'(v);
  endfunction

  // Round half-up and drop FRAC fractional bits (FRAC >= 1).
  function automatic acc_t round_shift(input acc_t v, input int unsigned frac);
    acc_t half;
    half = acc_t'(1) <<< (frac - 1);
    return (v + half) >>> frac;
  endfunction

  // Saturating negation (-(-32768) gives 32767).
  function automatic sample_t neg_sat(input sample_t v);
    return sat(-acc_t'(v));
  endfunction

endpackage
