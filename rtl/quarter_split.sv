// quarter_split: centre modulator behind the bandpass filter. Each sample x
// of the (gain-scaled) bandpass output is sent to both interpolation
// branches, multiplied by 0,1,0,-1,... for the upper (I) branch and by
// 1,0,-1,0,... for the lower (Q) branch, the inverse of quarter_combine.
// For n = 0,1,2,3 (mod 4) the pair (I, Q) is (0, x), (x, 0), (0, -x), (-x, 0).
//
// The sequences are the ones printed in the document's block diagram; the
// start phase and the handshake are this design's choices. A sample is
// taken (in_ready) only when both branches can accept it, and then goes to
// both in the same clock (combinational path).
module quarter_split
  import lpeq_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  output logic    in_ready,
  input  sample_t in_data,
  output logic    i_valid,
  input  logic    i_ready,
  output sample_t i_data,
  output logic    q_valid,
  input  logic    q_ready,
  output sample_t q_data
);

  logic [1:0] n;

  assign in_ready = i_ready && q_ready;
  assign i_valid  = in_valid && in_ready;
  assign q_valid  = i_valid;

  always_comb begin
    unique case (n)
      2'd0:    begin i_data = '0;               q_data = in_data;          end
      2'd1:    begin i_data = in_data;          q_data = '0;               end
      2'd2:    begin i_data = '0;               q_data = neg_sat(in_data); end
      default: begin i_data = neg_sat(in_data); q_data = '0;               end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       n <= '0;
    else if (i_valid) n <= n + 1'b1;
  end

endmodule
