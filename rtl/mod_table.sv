// mod_table: cyclic cosine and sine tables for the band's single-sideband
// modulator (input side) and demodulator (output side).
//
// A hardware multiplier cannot evaluate cos(x) directly, so the values
// sqrt(2)*cos(wc*k) and sqrt(2)*sin(wc*k) are kept in two tables of one
// period each; the period, and so the table length, depends on the ratio
// of the sample rate to the band centre frequency. The tables are written
// by the host: wsel 0 writes the cosine table, 1 the sine table, 2 sets the
// number of used entries (len, 1..DEPTH). The values are Q2.14. Two
// independent read ports (a: modulator, b: demodulator) return both tables
// at an index without delay (combinational read). Writes take effect at the
// next clock. The use of tables follows the document; the port layout and
// the format are this design's choices.
module mod_table
  import lpeq_pkg::*;
#(
  parameter int unsigned DEPTH = 256,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [1:0]    wsel,
  input  logic [AW-1:0] waddr,
  input  tab_t          wdata,
  output logic [AW:0]   len,
  input  logic [AW-1:0] ra_idx,
  output tab_t          ra_cos,
  output tab_t          ra_sin,
  input  logic [AW-1:0] rb_idx,
  output tab_t          rb_cos,
  output tab_t          rb_sin
);

  tab_t cos_mem [DEPTH];
  tab_t sin_mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && wsel == 2'd0) cos_mem[waddr] <= wdata;
    if (we && wsel == 2'd1) sin_mem[waddr] <= wdata;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                   len <= (AW+1)'(1);
    else if (we && wsel == 2'd2)  len <= (wdata == '0 || 32'(wdata) > DEPTH) ? (AW+1)'(DEPTH)
                                                                             : (AW+1)'(wdata);
  end

  assign ra_cos = cos_mem[ra_idx];
  assign ra_sin = sin_mem[ra_idx];
  assign rb_cos = cos_mem[rb_idx];
  assign rb_sin = sin_mem[rb_idx];

endmodule
