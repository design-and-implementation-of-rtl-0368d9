// lpeq_equalizer: the linear-phase audio equalizer: NBANDS band processors
// (lpeq_band) in parallel on the same 44.1 kHz, 16-bit input, each with
// its own centre frequency (cos/sin table), filters and user gain, a delay
// line per band (band_delay) and an adder that sums the band outputs
// (band_adder). With equal gains and complementary band filters the sum has
// a flat amplitude response, and because every filter is a symmetric FIR
// filter the phase is linear.
//
// The document specifies ten octave bands (30 Hz - 20 kHz) summed from
// parallel bandpass filters; its chip design computes one band. Each band's
// structure (rate factors, filter lengths) is a per-band parameter array,
// all bands equal by default. Bands of different structure have different
// delays; the document asks for all bands to be delayed to a common
// symmetry point. Band b is delayed by LOW_DELAY[b] samples at its lowest
// rate (low_rate_delay, before h7; LOW_DELAY[b]*M1*M2*M3 audio samples at
// the cost of LOW_DELAY[b] words) plus DELAY[b] audio samples after the
// band (band_delay); all zero by default, where the delays are already
// equal. The per-band arrays, the placement of the two delays and the
// configuration layout are this design's choices.
//
// Interface: as lpeq_band, plus cfg_band selecting the band a
// configuration write goes to. out_valid/out_data carry the summed output
// three clocks after a strobe once the first band has started; overrun and
// underrun are the OR of all bands; ready is the AND.
module lpeq_equalizer
  import lpeq_pkg::*;
#(
  parameter int unsigned NBANDS  = 10,
  // structure of each band (entry b for band b; entries from NBANDS on are
  // not used); see lpeq_band
  parameter band_arr_t M1      = '{default: 2},
  parameter band_arr_t M2      = '{default: 2},
  parameter band_arr_t M3      = '{default: 2},
  parameter band_arr_t L1      = '{default: 2},
  parameter band_arr_t L2      = '{default: 2},
  parameter band_arr_t L3      = '{default: 2},
  parameter band_arr_t LEN_H1  = '{default: 15},
  parameter band_arr_t LEN_H2  = '{default: 31},
  parameter band_arr_t LEN_H3  = '{default: 63},
  parameter band_arr_t LEN_H7  = '{default: 79},
  parameter band_arr_t LEN_H8  = '{default: 47},
  parameter band_arr_t LEN_H9  = '{default: 31},
  parameter band_arr_t LEN_H10 = '{default: 15},
  // delay equalisation: coarse delay of each band at its lowest rate, in
  // samples of that rate (multiple of 4, see low_rate_delay), and fine
  // delay after the band, in output samples
  parameter band_arr_t LOW_DELAY = '{default: 0},
  parameter band_arr_t DELAY     = '{default: 0},
  parameter int unsigned TAB_DEPTH = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_data,
  output logic        out_valid,
  output sample_t     out_data,
  input  logic        cfg_we,
  input  logic [3:0]  cfg_band,
  input  logic [15:0] cfg_addr,
  input  logic [15:0] cfg_wdata,
  output logic        ready,
  output logic        overrun,
  output logic        underrun
);

  logic    b_valid [NBANDS], b_ready [NBANDS], b_over [NBANDS], b_under [NBANDS];
  sample_t b_data  [NBANDS];
  logic    d_valid [NBANDS];
  sample_t d_data  [NBANDS];

  for (genvar b = 0; b < NBANDS; b++) begin : g_band
    lpeq_band #(
      .M1(M1[b]), .M2(M2[b]), .M3(M3[b]), .L1(L1[b]), .L2(L2[b]), .L3(L3[b]),
      .LEN_H1(LEN_H1[b]), .LEN_H2(LEN_H2[b]), .LEN_H3(LEN_H3[b]), .LEN_H7(LEN_H7[b]),
      .LEN_H8(LEN_H8[b]), .LEN_H9(LEN_H9[b]), .LEN_H10(LEN_H10[b]), .TAB_DEPTH(TAB_DEPTH),
      .LOW_DELAY(LOW_DELAY[b])
    ) u_band (
      .clk, .rst_n, .in_valid, .in_data,
      .out_valid(b_valid[b]), .out_data(b_data[b]),
      .cfg_we(cfg_we && cfg_band == 4'(b)), .cfg_addr, .cfg_wdata,
      .ready(b_ready[b]), .overrun(b_over[b]), .underrun(b_under[b])
    );

    band_delay #(.DELAY(DELAY[b])) u_delay (
      .clk, .rst_n, .in_valid(d_strobe), .in_data(b_valid[b] ? b_data[b] : '0),
      .out_valid(d_valid[b]), .out_data(d_data[b])
    );
  end

  // The bands answer a strobe one clock later (out_valid of a started band).
  // From the first band output on, every strobe moves all delay lines, a
  // band without an output sample (not started yet, or underrun)
  // contributing zero, so that the band sum stays aligned in time.
  logic strobe_q, run_q, any_valid, d_strobe;
  always_comb begin
    any_valid = 1'b0;
    for (int b = 0; b < int'(NBANDS); b++) any_valid |= b_valid[b];
  end
  assign d_strobe = strobe_q && (run_q || any_valid);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      strobe_q <= 1'b0;
      run_q    <= 1'b0;
    end else begin
      strobe_q <= in_valid;
      if (any_valid) run_q <= 1'b1;
    end
  end

  band_adder #(.NBANDS(NBANDS)) u_add (
    .clk, .rst_n, .in_valid(d_valid), .in_data(d_data), .out_valid, .out_data
  );

  always_comb begin
    ready    = 1'b1;
    overrun  = 1'b0;
    underrun = 1'b0;
    for (int b = 0; b < int'(NBANDS); b++) begin
      ready    &= b_ready[b];
      overrun  |= b_over[b];
      underrun |= b_under[b];
    end
  end

endmodule
