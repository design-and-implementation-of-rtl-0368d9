// tb_sample_fifo: random pushes and pops against a queue model. Checks the
// data order, the fill count, that a full buffer refuses writes and that
// an empty one shows no valid word.
module tb_sample_fifo;
  localparam int W = 16, DEPTH = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic [$clog2(DEPTH+1)-1:0] count;
  int checks = 0, failures = 0, n_full = 0;
  logic [W-1:0] q [$];

  sample_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      in_valid  = ($urandom_range(99) < (i < 1500 ? 70 : 30));
      in_data   = W'($urandom);
      out_ready = ($urandom_range(99) < (i < 1500 ? 30 : 70));
      #1;
      checks++;
      if (int'(count) != q.size() || in_ready != (q.size() < DEPTH) || out_valid != (q.size() != 0)) begin
        failures++; $display("state: count %0d model %0d ready %b valid %b", count, q.size(), in_ready, out_valid);
      end
      if (q.size() == DEPTH) n_full++;
      if (out_valid && out_ready) begin
        checks++;
        if (out_data != q[0]) begin failures++; $display("data %h expected %h", out_data, q[0]); end
        void'(q.pop_front());
      end
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++; if (n_full == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
