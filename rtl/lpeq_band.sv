// lpeq_band: one band of a linear-phase audio equalizer, built as a
// single-sideband multirate bandpass filter and spread over four
// time-shared serial-parallel multiplier stages.
//
// Signal flow (sample rate fs = 44.1 kHz at input and output):
//   u(k) -> x sqrt2*cos / x sqrt2*sin            (quad_modulator)
//        -> I: h1 v M1, h2 v M2, h3 v M3          (multiplier 1: h1,h2,h4,h5)
//           Q: h4 v M4, h5 v M5, h6 v M6          (multiplier 2: h3,h6,...)
//        -> x 0,1,0,-1 / x 1,0,-1,0 and add       (quarter_combine)
//        -> optional delay of LOW_DELAY samples   (low_rate_delay)
//        -> h7 (bandpass h_bp), user gain         (multiplier 2, band_gain)
//        -> x 0,1,0,-1 / x 1,0,-1,0               (quarter_split)
//        -> I: ^L1 h8, ^L2 h9, ^L3 h10            (multiplier 2: h8,h11;
//           Q: ^L4 h11, ^L5 h12, ^L6 h13           multiplier 3: h9,h12;
//                                                  multiplier 4: h10,h13)
//        -> x sqrt2*cos / x sqrt2*sin and add     (quad_demodulator)
//        -> output buffer, one sample per strobe  (output_buffer) -> y(k)
// The branch structure, the division of the thirteen filters over the four
// multipliers, the symmetric pre-addition and the three-stage decimation
// and interpolation follow the document. The document gives no filter
// lengths or rate factors for this chip, so the defaults (factors 2 per
// stage, lengths 15/31/63/79/47/31/15 from h1 to h10) are this design's
// choice, picked so that each multiplier keeps up with 44.1 kHz at a
// 25 MHz clock (about 566 clocks per sample). The I and Q branches use the
// same filters (h4=h1, h5=h2, ...) but each has its own coefficient table.
//
// Interface. in_valid is the audio sample strobe (one clock per sample
// period) with the input sample in in_data; the same strobe reads one
// output sample, given one clock later on out_valid/out_data once the
// output buffer has filled. overrun pulses when an input sample had to be
// dropped, underrun when a strobe found no output sample. ready rises when
// the sample memories have been cleared after reset. Coefficients, tables
// and gain are written through cfg_we/cfg_addr/cfg_wdata:
//   cfg_addr[15:12] = 0..3 : coefficients of multiplier 1..4, cfg_addr[9:0]
//                             the address (slot after slot, half tables)
//                     4    : sqrt2*cos table, Q2.14, index cfg_addr[7:0]
//                     5    : sqrt2*sin table, Q2.14
//                     6    : table length (1..TAB_DEPTH)
//                     7    : band gain, Q2.14 (reset value 1.0)
// This address map is this design's choice; the document keeps
// coefficients in external memory.
module lpeq_band
  import lpeq_pkg::*;
#(
  parameter int unsigned M1 = 2,   // decimation M1 = M4
  parameter int unsigned M2 = 2,   // decimation M2 = M5
  parameter int unsigned M3 = 2,   // decimation M3 = M6
  parameter int unsigned L1 = 2,   // interpolation L1 = L4
  parameter int unsigned L2 = 2,   // interpolation L2 = L5
  parameter int unsigned L3 = 2,   // interpolation L3 = L6
  parameter int unsigned LEN_H1  = 15,   // h1, h4
  parameter int unsigned LEN_H2  = 31,   // h2, h5
  parameter int unsigned LEN_H3  = 63,   // h3, h6
  parameter int unsigned LEN_H7  = 79,   // h7 (bandpass)
  parameter int unsigned LEN_H8  = 47,   // h8, h11
  parameter int unsigned LEN_H9  = 31,   // h9, h12
  parameter int unsigned LEN_H10 = 15,   // h10, h13
  parameter int unsigned TAB_DEPTH = 256,
  parameter int unsigned IN_DEPTH  = 2 * M1,
  parameter int unsigned OUT_DEPTH = 2 * M1 * M2 * M3,
  parameter int unsigned OUT_START = M1 * M2 * M3,
  // delay before h7 in samples of its rate (multiple of 4): a delay of
  // LOW_DELAY*M1*M2*M3 audio samples, for delay equalisation between bands
  parameter int unsigned LOW_DELAY = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  sample_t     in_data,
  output logic        out_valid,
  output sample_t     out_data,
  input  logic        cfg_we,
  input  logic [15:0] cfg_addr,
  input  logic [15:0] cfg_wdata,
  output logic        ready,
  output logic        overrun,
  output logic        underrun
);

  localparam int unsigned TAW = $clog2(TAB_DEPTH);
  localparam int unsigned CAW = 10;

  // ------------------------------------------------------------ configuration
  logic [3:0] cfg_tgt;
  logic       cw_en [4];
  logic signed [GAIN_W-1:0] gain;

  assign cfg_tgt = cfg_addr[15:12];
  always_comb for (int e = 0; e < 4; e++) cw_en[e] = cfg_we && (cfg_tgt == 4'(e));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          gain <= GAIN_W'(1 << GAIN_FRAC);
    else if (cfg_we && cfg_tgt == 4'd7)  gain <= cfg_wdata;
  end

  // ------------------------------------------------------------ cos/sin tables
  logic [TAW:0]   tab_len;
  logic [TAW-1:0] mod_idx, dem_idx;
  tab_t           mod_cos, mod_sin, dem_cos, dem_sin;

  mod_table #(.DEPTH(TAB_DEPTH)) u_tab (
    .clk, .rst_n,
    .we    (cfg_we && (cfg_tgt == 4'd4 || cfg_tgt == 4'd5 || cfg_tgt == 4'd6)),
    .wsel  (cfg_tgt[1:0]),
    .waddr (cfg_addr[TAW-1:0]),
    .wdata (cfg_wdata),
    .len   (tab_len),
    .ra_idx(mod_idx), .ra_cos(mod_cos), .ra_sin(mod_sin),
    .rb_idx(dem_idx), .rb_cos(dem_cos), .rb_sin(dem_sin)
  );

  // --------------------------------------------------------------- modulator
  logic    mi_valid, mq_valid;
  sample_t mi_data, mq_data;

  // multiplier stage handshakes
  logic    e1_iv [4], e1_ir [4], e1_ov [4], e1_or [4];
  sample_t e1_id [4], e1_od;
  logic    e2_iv [5], e2_ir [5], e2_ov [5], e2_or [5];
  sample_t e2_id [5], e2_od;
  logic    e3_iv [2], e3_ir [2], e3_ov [2], e3_or [2];
  sample_t e3_id [2], e3_od;
  logic    e4_iv [2], e4_ir [2], e4_ov [2], e4_or [2];
  sample_t e4_id [2], e4_od;
  logic    init [4];

  quad_modulator #(.AW(TAW)) u_mod (
    .clk, .rst_n, .in_valid, .in_data,
    .len(tab_len), .tab_idx(mod_idx), .tab_cos(mod_cos), .tab_sin(mod_sin),
    .i_valid(mi_valid), .i_ready(e1_ir[0]), .i_data(mi_data),
    .q_valid(mq_valid), .q_ready(e1_ir[1]), .q_data(mq_data),
    .overrun
  );

  // ---------------------------------------------- multiplier 1: h1 h4 h2 h5
  // slot 0 h1 (I), 1 h4 (Q), 2 h2 (I), 3 h5 (Q)
  assign e1_iv[0] = mi_valid;  assign e1_id[0] = mi_data;
  assign e1_iv[1] = mq_valid;  assign e1_id[1] = mq_data;
  assign e1_iv[2] = e1_ov[0];  assign e1_id[2] = e1_od;   assign e1_or[0] = e1_ir[2];
  assign e1_iv[3] = e1_ov[1];  assign e1_id[3] = e1_od;   assign e1_or[1] = e1_ir[3];
  assign e1_or[2] = e2_ir[0];
  assign e1_or[3] = e2_ir[1];

  fir_engine #(
    .NSLOT(4), .LEN('{LEN_H1, LEN_H1, LEN_H2, LEN_H2, 0, 0, 0, 0}),
    .DOWN('{M1, M1, M2, M2, 1, 1, 1, 1}), .UP('{1, 1, 1, 1, 1, 1, 1, 1}),
    .FIFO_DEPTH(IN_DEPTH), .CAW(CAW)
  ) u_e1 (
    .clk, .rst_n, .in_valid(e1_iv), .in_ready(e1_ir), .in_data(e1_id),
    .out_valid(e1_ov), .out_ready(e1_or), .out_data(e1_od),
    .cw_en(cw_en[0]), .cw_addr(cfg_addr[CAW-1:0]), .cw_data(cfg_wdata),
    .init_done(init[0]), .busy()
  );

  // ------------------------------------- multiplier 2: h3 h6 h7 h8 h11
  // slot 0 h3 (I), 1 h6 (Q), 2 h7 (bandpass), 3 h8 (I), 4 h11 (Q)
  logic    c_valid, c_ready;
  sample_t c_data, g_data;

  assign e2_iv[0] = e1_ov[2];  assign e2_id[0] = e1_od;
  assign e2_iv[1] = e1_ov[3];  assign e2_id[1] = e1_od;

  quarter_combine u_comb (
    .clk, .rst_n,
    .i_valid(e2_ov[0]), .i_ready(e2_or[0]), .i_data(e2_od),
    .q_valid(e2_ov[1]), .q_ready(e2_or[1]), .q_data(e2_od),
    .out_valid(c_valid), .out_ready(c_ready), .out_data(c_data)
  );

  // coarse delay equalisation at the lowest rate, before h7
  logic    l_valid, l_ready;
  sample_t l_data;

  low_rate_delay #(.DELAY(LOW_DELAY)) u_ldel (
    .clk, .rst_n,
    .in_valid(c_valid), .in_ready(c_ready), .in_data(c_data),
    .out_valid(l_valid), .out_ready(l_ready), .out_data(l_data)
  );

  assign e2_iv[2] = l_valid;  assign e2_id[2] = l_data;  assign l_ready = e2_ir[2];

  band_gain u_gain (.in_data(e2_od), .gain, .out_data(g_data));

  quarter_split u_split (
    .clk, .rst_n,
    .in_valid(e2_ov[2]), .in_ready(e2_or[2]), .in_data(g_data),
    .i_valid(e2_iv[3]), .i_ready(e2_ir[3]), .i_data(e2_id[3]),
    .q_valid(e2_iv[4]), .q_ready(e2_ir[4]), .q_data(e2_id[4])
  );

  assign e2_or[3] = e3_ir[0];
  assign e2_or[4] = e3_ir[1];

  fir_engine #(
    .NSLOT(5), .LEN('{LEN_H3, LEN_H3, LEN_H7, LEN_H8, LEN_H8, 0, 0, 0}),
    .DOWN('{M3, M3, 1, 1, 1, 1, 1, 1}), .UP('{1, 1, 1, L1, L1, 1, 1, 1}),
    .FIFO_DEPTH(2), .CAW(CAW)
  ) u_e2 (
    .clk, .rst_n, .in_valid(e2_iv), .in_ready(e2_ir), .in_data(e2_id),
    .out_valid(e2_ov), .out_ready(e2_or), .out_data(e2_od),
    .cw_en(cw_en[1]), .cw_addr(cfg_addr[CAW-1:0]), .cw_data(cfg_wdata),
    .init_done(init[1]), .busy()
  );

  // ------------------------------------------------ multiplier 3: h9 h12
  assign e3_iv[0] = e2_ov[3];  assign e3_id[0] = e2_od;
  assign e3_iv[1] = e2_ov[4];  assign e3_id[1] = e2_od;
  assign e3_or[0] = e4_ir[0];
  assign e3_or[1] = e4_ir[1];

  fir_engine #(
    .NSLOT(2), .LEN('{LEN_H9, LEN_H9, 0, 0, 0, 0, 0, 0}),
    .DOWN('{1, 1, 1, 1, 1, 1, 1, 1}), .UP('{L2, L2, 1, 1, 1, 1, 1, 1}),
    .FIFO_DEPTH(2), .CAW(CAW)
  ) u_e3 (
    .clk, .rst_n, .in_valid(e3_iv), .in_ready(e3_ir), .in_data(e3_id),
    .out_valid(e3_ov), .out_ready(e3_or), .out_data(e3_od),
    .cw_en(cw_en[2]), .cw_addr(cfg_addr[CAW-1:0]), .cw_data(cfg_wdata),
    .init_done(init[2]), .busy()
  );

  // ----------------------------------------------- multiplier 4: h10 h13
  assign e4_iv[0] = e3_ov[0];  assign e4_id[0] = e3_od;
  assign e4_iv[1] = e3_ov[1];  assign e4_id[1] = e3_od;

  fir_engine #(
    .NSLOT(2), .LEN('{LEN_H10, LEN_H10, 0, 0, 0, 0, 0, 0}),
    .DOWN('{1, 1, 1, 1, 1, 1, 1, 1}), .UP('{L3, L3, 1, 1, 1, 1, 1, 1}),
    .FIFO_DEPTH(2), .CAW(CAW)
  ) u_e4 (
    .clk, .rst_n, .in_valid(e4_iv), .in_ready(e4_ir), .in_data(e4_id),
    .out_valid(e4_ov), .out_ready(e4_or), .out_data(e4_od),
    .cw_en(cw_en[3]), .cw_addr(cfg_addr[CAW-1:0]), .cw_data(cfg_wdata),
    .init_done(init[3]), .busy()
  );

  // --------------------------------------------------------- demodulator
  logic    d_valid, d_ready;
  sample_t d_data;

  quad_demodulator #(.AW(TAW)) u_dem (
    .clk, .rst_n,
    .i_valid(e4_ov[0]), .i_ready(e4_or[0]), .i_data(e4_od),
    .q_valid(e4_ov[1]), .q_ready(e4_or[1]), .q_data(e4_od),
    .len(tab_len), .tab_idx(dem_idx), .tab_cos(dem_cos), .tab_sin(dem_sin),
    .out_valid(d_valid), .out_ready(d_ready), .out_data(d_data)
  );

  output_buffer #(.DEPTH(OUT_DEPTH), .START(OUT_START)) u_obuf (
    .clk, .rst_n,
    .in_valid(d_valid), .in_ready(d_ready), .in_data(d_data),
    .strobe(in_valid), .out_valid, .out_data, .underrun, .started()
  );

  assign ready = init[0] && init[1] && init[2] && init[3];

endmodule
