// sp_multiplier: serial-parallel two's complement multiplier.
//
// The parallel operand A is applied whole; the serial operand X is consumed
// one bit per clock, least significant bit first. Each clock adds A (or, for
// the sign bit of X, subtracts A) into a partial-product register when the
// current bit of X is one, and shifts the partial product right by one place
// into the register that held X. After XW clocks the register pair holds the
// full AW+XW bit product. This is the classic add-and-shift serial-parallel
// multiplier; the document names the multiplier type, the circuit is this
// design's choice.
//
// Interface: pulse start for one clock with a and x valid (ignored while
// busy). busy is high for XW clocks; done pulses in the clock after the last
// step, and p holds the product from then until the next start.
module sp_multiplier #(
  parameter int unsigned AW = 16,  // parallel operand width
  parameter int unsigned XW = 17   // serial operand width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [AW-1:0]     a,
  input  logic signed [XW-1:0]     x,
  output logic                     busy,
  output logic                     done,
  output logic signed [AW+XW-1:0]  p
);

  logic signed [AW:0]       acc;   // high part of the partial product
  logic        [XW-1:0]     xr;    // remaining bits of x, then low product bits
  logic signed [AW-1:0]     ar;    // registered parallel operand
  localparam int CW = $clog2(XW+1);
  localparam logic [CW-1:0] CNT_LAST = CW'(XW - 1);
  logic [CW-1:0]            cnt;

  logic signed [AW:0] addend, sum;

  always_comb begin
    if (!xr[0])               addend = '0;
    else if (cnt == CNT_LAST) addend = -(AW+1)'(ar);   // sign bit weighs -2^(XW-1)
    else                      addend = (AW+1)'(ar);
    sum = acc + addend;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      xr   <= '0;
      ar   <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (busy) begin
        acc <= {sum[AW], sum[AW:1]};
        xr  <= {sum[0], xr[XW-1:1]};
        cnt <= cnt + 1'b1;
        if (cnt == CNT_LAST) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end else if (start) begin
        acc  <= '0;
        xr   <= x;
        ar   <= a;
        cnt  <= '0;
        busy <= 1'b1;
      end
    end
  end

  assign p = {acc[AW-1:0], xr};

endmodule
