// tb_output_buffer: fills the buffer in bursts and strobes it regularly.
// Checks that nothing is emitted before START samples were present, that
// samples come out in order one clock after a strobe, that a strobe on an
// empty started buffer gives underrun, and that a full buffer refuses.
module tb_output_buffer;
  import lpeq_pkg::*;
  localparam int DEPTH = 4, START = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, strobe = 0, out_valid, underrun, started;
  sample_t in_data = '0, out_data;
  int checks = 0, failures = 0, n_ur = 0, n_full = 0, n_out = 0;
  int q [$];
  bit st = 0;

  output_buffer #(.DEPTH(DEPTH), .START(START)) dut (.*);

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 3000; c++) begin
      bit exp_pop, exp_ur;
      @(negedge clk);
      in_valid = (c % 40 < 8) && ($urandom_range(1) == 0);
      in_data  = sample_t'($urandom);
      strobe   = (c % 10 == 9) && c > 20;
      #1;
      checks++;
      if (in_ready != (q.size() < DEPTH)) begin failures++; $display("in_ready wrong"); end
      if (!in_ready && in_valid) n_full++;
      exp_pop = strobe && st && q.size() > 0;
      exp_ur  = strobe && st && q.size() == 0;
      @(posedge clk);
      if (q.size() >= START) st = 1;    // level before this clock's write
      if (in_valid && in_ready) q.push_back(in_data);
      #1;
      checks++;
      if (out_valid != exp_pop || underrun != exp_ur) begin
        failures++; $display("cycle %0d: valid %b underrun %b expected %b %b", c, out_valid, underrun, exp_pop, exp_ur);
      end
      if (exp_pop) begin
        checks++;
        if (int'(out_data) != q[0]) begin failures++; $display("data %0d expected %0d", out_data, q[0]); end
        void'(q.pop_front()); n_out++;
      end
      if (exp_ur) n_ur++;
      checks++; if (started != st) begin failures++; $display("started wrong"); end
    end
    checks++; if (n_ur == 0 || n_full == 0 || n_out < 50) begin failures++; $display("coverage %0d %0d %0d", n_ur, n_full, n_out); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
