// band_adder: output adder of the equalizer. The equalizer is a set of
// parallel bandpass bands, each with its own gain; its output is the sum of
// the band outputs. The bands reach it through their delay lines, which
// all move on the same strobe, so all inputs are valid together; it sums
// the NBANDS samples at full precision, saturates to 16 bits and registers
// the result (out_valid one clock after in_valid[0]). That the bands are
// added follows the document; the saturation is this design's choice. An
// assertion checks that all bands deliver together.
module band_adder
  import lpeq_pkg::*;
#(
  parameter int unsigned NBANDS = 10
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid [NBANDS],
  input  sample_t in_data  [NBANDS],
  output logic    out_valid,
  output sample_t out_data
);

  acc_t sum;
  always_comb begin
    sum = '0;
    for (int b = 0; b < int'(NBANDS); b++) sum += acc_t'(in_data[b]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= in_valid[0];
      if (in_valid[0]) out_data <= sat(sum);
    end
  end

  for (genvar g = 1; g < NBANDS; g++) begin : g_chk
    a_aligned : assert property (@(posedge clk) disable iff (!rst_n) in_valid[g] == in_valid[0]);
  end

endmodule
