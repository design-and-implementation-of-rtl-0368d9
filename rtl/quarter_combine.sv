// quarter_combine: centre modulator and adder in front of the band's
// bandpass filter. After decimation by M the band edge lies at a quarter of
// the reduced sample rate; multiplying the I branch by the sequence
// 0,1,0,-1,... and the Q branch by 1,0,-1,0,... (a shift by pi/2 per sample)
// and adding the two moves the band to the place where the real bandpass
// filter h_bp expects it. Since one of the two factors is always zero, the
// output is, for n = 0,1,2,3 (mod 4): Q, I, -Q, -I (negation saturates).
//
// The two sequences are those printed in the document's block diagram; the
// start phase (n = 0 at the first sample pair) and the handshakes are this
// design's choices. I and Q arrive at different times from the shared
// multiplier, so each has a small FIFO; a pair is combined and passed on
// (out_valid, combinational from the FIFO heads) when both are present.
module quarter_combine
  import lpeq_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    i_valid,
  output logic    i_ready,
  input  sample_t i_data,
  input  logic    q_valid,
  output logic    q_ready,
  input  sample_t q_data,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data
);

  logic    hi_v, hq_v, take;
  sample_t hi, hq;
  logic [1:0] n;
  logic [$clog2(DEPTH+1)-1:0] ci, cq;

  sample_fifo #(.W(SAMPLE_W), .DEPTH(DEPTH)) u_fi (
    .clk, .rst_n, .in_valid(i_valid), .in_ready(i_ready), .in_data(i_data),
    .out_valid(hi_v), .out_ready(take), .out_data(hi), .count(ci));
  sample_fifo #(.W(SAMPLE_W), .DEPTH(DEPTH)) u_fq (
    .clk, .rst_n, .in_valid(q_valid), .in_ready(q_ready), .in_data(q_data),
    .out_valid(hq_v), .out_ready(take), .out_data(hq), .count(cq));

  assign out_valid = hi_v && hq_v;
  assign take      = out_valid && out_ready;

  always_comb begin
    unique case (n)
      2'd0:    out_data = hq;
      2'd1:    out_data = hi;
      2'd2:    out_data = neg_sat(hq);
      default: out_data = neg_sat(hi);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    n <= '0;
    else if (take) n <= n + 1'b1;
  end

endmodule
