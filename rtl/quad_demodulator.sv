// quad_demodulator: output demodulator and adder of the band. The k-th
// interpolated I and Q samples are multiplied by sqrt(2)*cos(wc*k) and
// sqrt(2)*sin(wc*k) and added, which moves the band back to its centre
// frequency wc and gives the band output y(k):
//   y(k) = sat(round((I(k)*cos_tab(k) + Q(k)*sin_tab(k)) / 2^14)).
// Both products are summed at full precision and rounded once.
//
// k counts output samples modulo the table length (read through the
// second port of mod_table). I and Q come at different times from the
// shared multiplier, so each has a small FIFO; out_valid is high
// (combinationally) when both heads are present, and the pair is consumed
// when out_ready is high. The structure follows the document; the formats,
// the single rounding and the handshakes are this design's choices.
module quad_demodulator
  import lpeq_pkg::*;
#(
  parameter int unsigned AW    = 8,
  parameter int unsigned DEPTH = 2
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          i_valid,
  output logic          i_ready,
  input  sample_t       i_data,
  input  logic          q_valid,
  output logic          q_ready,
  input  sample_t       q_data,
  input  logic [AW:0]   len,
  output logic [AW-1:0] tab_idx,
  input  tab_t          tab_cos,
  input  tab_t          tab_sin,
  output logic          out_valid,
  input  logic          out_ready,
  output sample_t       out_data
);

  logic    hi_v, hq_v, take;
  sample_t hi, hq;
  logic [$clog2(DEPTH+1)-1:0] ci, cq;

  sample_fifo #(.W(SAMPLE_W), .DEPTH(DEPTH)) u_fi (
    .clk, .rst_n, .in_valid(i_valid), .in_ready(i_ready), .in_data(i_data),
    .out_valid(hi_v), .out_ready(take), .out_data(hi), .count(ci));
  sample_fifo #(.W(SAMPLE_W), .DEPTH(DEPTH)) u_fq (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_data(q_data),
    .out_valid(hq_v), .out_ready(take), .out_data(hq), .count(cq));

  assign out_valid = hi_v && hq_v;
  assign take      = out_valid && out_ready;
  assign out_data  = sat(round_shift(acc_t'(hi) * acc_t'(tab_cos) + acc_t'(hq) * acc_t'(tab_sin),
                                     TAB_FRAC));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    tab_idx <= '0;
    else if (take) tab_idx <= ((AW+1)'(tab_idx) + 1'b1 >= len) ? '0 : tab_idx + 1'b1;
  end

endmodule
