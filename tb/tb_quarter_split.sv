// tb_quarter_split: samples offered at random, branches ready at random.
// Expected (I, Q) per accepted sample n, worked out here: (0, x), (x, 0),
// (0, -x), (-x, 0), repeating; a sample is accepted only when both
// branches are ready and then reaches both in the same clock.
module tb_quarter_split;
  import lpeq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, i_valid, i_ready = 0, q_valid, q_ready = 0;
  sample_t in_data = '0, i_data, q_data;
  int checks = 0, failures = 0, n = 0;

  quarter_split dut (.*);

  function automatic int ns(int v); return (v == -32768) ? 32767 : -v; endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      @(negedge clk);
      in_valid = ($urandom_range(1) == 0);
      in_data  = (c % 11 == 0) ? 16'sh8000 : sample_t'($urandom);
      i_ready  = ($urandom_range(3) != 0);
      q_ready  = ($urandom_range(3) != 0);
      #1;
      checks++;
      if (in_ready != (i_ready && q_ready) || i_valid != (in_valid && in_ready) || q_valid != i_valid) begin
        failures++; $display("handshake wrong");
      end
      if (i_valid) begin
        int ei, eq;
        case (n % 4)
          0: begin ei = 0; eq = in_data; end
          1: begin ei = in_data; eq = 0; end
          2: begin ei = 0; eq = ns(in_data); end
          default: begin ei = ns(in_data); eq = 0; end
        endcase
        checks++;
        if (int'(i_data) != ei || int'(q_data) != eq) begin
          failures++; $display("n %0d: %0d %0d expected %0d %0d", n, i_data, q_data, ei, eq);
        end
        n++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
