// band_gain: the user-set gain factor of the band, applied to the output of
// the bandpass filter at the lowest sample rate of the band, where one
// multiplication per output suffices. gain is Q2.14 (16384 is unity, the
// largest value is just under 2, i.e. +6 dB); the product is rounded and
// saturated. Purely combinational. The place of the gain follows the
// document's single-band data flow; its format is this design's choice.
module band_gain
  import lpeq_pkg::*;
(
  input  sample_t                    in_data,
  input  logic signed [GAIN_W-1:0]   gain,
  output sample_t                    out_data
);

  assign out_data = sat(round_shift(acc_t'(in_data) * acc_t'(gain), GAIN_FRAC));

endmodule
