// quad_modulator: input modulator of the band. Each input sample u(k) is
// multiplied by sqrt(2)*cos(wc*k) and by sqrt(2)*sin(wc*k), giving the
// in-phase (I) and quadrature (Q) branches that shift the band's centre
// frequency down to zero before the decimation filters.
//
// k runs modulo the table length len; the table values come from mod_table
// through tab_idx/tab_cos/tab_sin. Products are rounded by 2^-14 and
// saturated. The structure follows the document; the formats are this
// design's choices.
//
// Timing: the products are registered, so i_valid/q_valid rise one clock
// after in_valid. Samples arrive at the audio rate and cannot wait, so if
// either branch is not ready in that clock the sample pair is dropped and
// overrun pulses; k advances regardless, keeping the phase tied to time.
module quad_modulator
  import lpeq_pkg::*;
#(
  parameter int unsigned AW = 8    // table address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  sample_t       in_data,
  input  logic [AW:0]   len,
  output logic [AW-1:0] tab_idx,
  input  tab_t          tab_cos,
  input  tab_t          tab_sin,
  output logic          i_valid,
  input  logic          i_ready,
  output sample_t       i_data,
  output logic          q_valid,
  input  logic          q_ready,
  output sample_t       q_data,
  output logic          overrun
);

  logic    v;
  sample_t ri, rq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tab_idx <= '0;
      v       <= 1'b0;
      ri      <= '0;
      rq      <= '0;
    end else begin
      v <= in_valid;
      if (in_valid) begin
        ri      <= sat(round_shift(acc_t'(in_data) * acc_t'(tab_cos), TAB_FRAC));
        rq      <= sat(round_shift(acc_t'(in_data) * acc_t'(tab_sin), TAB_FRAC));
        tab_idx <= ((AW+1)'(tab_idx) + 1'b1 >= len) ? '0 : tab_idx + 1'b1;
      end
    end
  end

  assign i_valid = v && i_ready && q_ready;
  assign q_valid = i_valid;
  assign i_data  = ri;
  assign q_data  = rq;
  assign overrun = v && !(i_ready && q_ready);

endmodule
