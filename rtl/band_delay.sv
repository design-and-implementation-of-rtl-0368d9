// band_delay: delay equalisation of one band. Bands built with different
// rate factors and filter lengths have different delays; for the sum of
// linear-phase bands to be linear-phase as well, every band must be delayed
// so that all impulse responses are symmetric about the same instant. Each
// band is therefore followed by a delay of DELAY output samples, so that
// all bands reach the same total delay (the longest one).
//
// The delay is a ring buffer of DELAY words at the audio rate: on every
// in_valid strobe the sample that came in DELAY strobes earlier is read
// out (zero while the buffer is still filling) and the new one is written
// in its place. out_valid/out_data are registered, one clock after the
// strobe. With DELAY = 0 only the output register remains.
//
// That bands need delay equalisation, and that it can be made with a memory
// buffer, follows the document. A delay at a decimated rate needs fewer
// words (low_rate_delay) but moves in coarse steps; this full-rate line
// supplies the fine remainder in single samples.
module band_delay
  import lpeq_pkg::*;
#(
  parameter int unsigned DELAY = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output sample_t out_data
);

  if (DELAY == 0) begin : g_none
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid <= 1'b0;
        out_data  <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) out_data <= in_data;
      end
    end
  end else begin : g_line
    localparam int unsigned AW = (DELAY > 1) ? $clog2(DELAY) : 1;

    sample_t       mem [DELAY];
    logic [AW-1:0] ptr;
    logic          full;   // DELAY samples have been written

    always_ff @(posedge clk) begin
      if (in_valid) mem[ptr] <= in_data;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        ptr       <= '0;
        full      <= 1'b0;
        out_valid <= 1'b0;
        out_data  <= '0;
      end else begin
        out_valid <= in_valid;
        if (in_valid) begin
          out_data <= full ? mem[ptr] : '0;
          if (32'(ptr) == DELAY - 1) begin
            ptr  <= '0;
            full <= 1'b1;
          end else begin
            ptr <= ptr + 1'b1;
          end
        end
      end
    end
  end

endmodule
