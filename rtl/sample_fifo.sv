// sample_fifo: first-in first-out sample buffer with a valid/ready handshake
// on both sides.
//
// It holds the samples that wait between two processing steps, such as the
// input buffer in front of the first decimation filter. A word is written
// when in_valid and in_ready are both high and read when out_valid and
// out_ready are both high; a write into a full buffer is refused (in_ready
// low, which depends only on the fill level, so no combinational path runs
// from out_ready to in_ready). Reading and writing in one clock is allowed.
// The storage is a circular array with read and write pointers. Depth and
// handshake are this design's choices; the document only says that samples
// are buffered.
module sample_fifo #(
  parameter int unsigned W     = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  output logic                        in_ready,
  input  logic [W-1:0]                in_data,
  output logic                        out_valid,
  input  logic                        out_ready,
  output logic [W-1:0]                out_data,
  output logic [$clog2(DEPTH+1)-1:0]  count
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] rp, wp;

  logic push, pop;
  assign in_ready  = (count < DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != 0);
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign out_data  = mem[rp];

  function automatic logic [AW-1:0] inc(input logic [AW-1:0] v);
    return (v == AW'(DEPTH - 1)) ? '0 : v + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rp    <= '0;
      wp    <= '0;
      count <= '0;
    end else begin
      if (push) wp <= inc(wp);
      if (pop)  rp <= inc(rp);
      case ({push, pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wp] <= in_data;
  end

endmodule
