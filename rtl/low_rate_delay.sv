// low_rate_delay: the coarse part of a band's delay equalisation, made at
// the band's lowest sample rate, between the centre combiner and the
// bandpass filter h7. A delay of one sample there is M1*M2*M3 samples at
// the audio rate, so a long delay costs few words.
//
// How it works: after reset the block first hands out DELAY zero samples,
// and only then the samples it receives, in order; the received samples
// wait in a FIFO of DELAY+2 words meanwhile. The sample sequence is thereby
// shifted by DELAY samples, which is a delay of DELAY*M1*M2*M3 audio
// samples for the band. DELAY must be a multiple of 4: the centre
// modulators before and after h7 run through their 0,1,0,-1 sequences with
// period 4, and a shift by a multiple of 4 keeps them in step. With
// DELAY = 0 the block is a two-word FIFO.
//
// That a delay at a lower rate saves memory follows the document; where
// it is placed and the zero preload are this design's choices.
//
// Interface: valid/ready on both sides.
module low_rate_delay
  import lpeq_pkg::*;
#(
  parameter int unsigned DELAY = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    out_valid,
  input  logic    out_ready,
  output sample_t out_data
);

  localparam int unsigned ZW = $clog2(DELAY + 1) + 1;

  logic          f_valid, f_ready;
  sample_t       f_data;
  logic [ZW-1:0] zeros;   // zero samples still to hand out

  sample_fifo #(.W(SAMPLE_W), .DEPTH(DELAY + 2)) u_fifo (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data(in_data),
    .out_valid(f_valid), .out_ready(f_ready), .out_data(f_data),
    .count()
  );

  assign out_valid = (zeros != '0) || f_valid;
  assign out_data  = (zeros != '0) ? '0 : f_data;
  assign f_ready   = (zeros == '0) && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                            zeros <= ZW'(DELAY);
    else if (zeros != '0 && out_ready)     zeros <= zeros - 1'b1;
  end

  a_mult4 : assert property (@(posedge clk) DELAY % 4 == 0);

endmodule
