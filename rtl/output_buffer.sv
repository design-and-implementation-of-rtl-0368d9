// output_buffer: the band's output sample buffer. The multirate filters
// deliver output samples in bursts (one burst of M samples for every M input
// samples, M the total decimation factor), while the audio output needs one
// sample in every sample period. The buffer collects the bursts and hands
// out one sample per strobe (the audio sample clock, the same strobe that
// brings a new input sample).
//
// It holds DEPTH samples (default 2*M: two blocks, as in a double buffer)
// and starts emitting only after it has once held START samples, so that a
// whole block is in stock before output begins; this start rule is this
// design's choice. Once started, a strobe with a sample present gives a
// one-clock out_valid with the sample in out_data (registered, one clock
// after the strobe); a strobe that finds the buffer empty gives underrun
// (and out_data 0). The input side uses valid/ready and is refused when
// full, which stalls the filters in front.
module output_buffer
  import lpeq_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned START = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  input  logic    strobe,
  output logic    out_valid,
  output sample_t out_data,
  output logic    underrun,
  output logic    started
);

  logic    h_v, pop;
  sample_t h;
  logic [$clog2(DEPTH+1)-1:0] count;

  sample_fifo #(.W(SAMPLE_W), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n, .in_valid, .in_ready, .in_data(in_data),
    .out_valid(h_v), .out_ready(pop), .out_data(h), .count);

  assign pop = strobe && started && h_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      started   <= 1'b0;
      out_valid <= 1'b0;
      out_data  <= '0;
      underrun  <= 1'b0;
    end else begin
      if (32'(count) >= START) started <= 1'b1;
      out_valid <= pop;
      underrun  <= strobe && started && !h_v;
      if (pop)         out_data <= h;
      else if (strobe) out_data <= '0;
    end
  end

endmodule
