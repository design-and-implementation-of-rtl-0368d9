// tb_band_gain: random and extreme samples and gains; the expected value
// is round-half-up of x*g/2^14, saturated to 16 bits, worked out here.
module tb_band_gain;
  import lpeq_pkg::*;
  sample_t in_data, out_data;
  logic signed [GAIN_W-1:0] gain;
  int checks = 0, failures = 0;
  band_gain dut (.*);
  function automatic int expect_g(int x, int g);
    longint v = (longint'(x) * g + 8192) >>> 14;
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction
  initial begin
    for (int i = 0; i < 2000; i++) begin
      in_data = (i < 4) ? ((i % 2) ? 16'sh7fff : 16'sh8000) : sample_t'($urandom);
      gain    = (i < 4) ? ((i < 2) ? 16'sh7fff : 16'sh4000) : 16'($urandom_range(32767));
      #1;
      checks++;
      if (int'(out_data) != expect_g(in_data, gain)) begin
        failures++; $display("%0d * %0d -> %0d", in_data, gain, out_data);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
