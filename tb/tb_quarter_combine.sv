// tb_quarter_combine: I and Q samples arrive at random times and the
// output is taken at random times. The expected sequence, worked out here,
// is Q, I, -Q, -I, ... (negation saturating). Also checks that an output is
// only offered when both samples of a pair are present.
module tb_quarter_combine;
  import lpeq_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic i_valid = 0, i_ready, q_valid = 0, q_ready, out_valid, out_ready = 0;
  sample_t i_data = '0, q_data = '0, out_data;
  int checks = 0, failures = 0;
  int iq [$], qq [$];
  int ni = 0, nq = 0, no = 0;

  quarter_combine dut (.*);

  function automatic int ns(int v); return (v == -32768) ? 32767 : -v; endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      i_valid = ($urandom_range(2) == 0); i_data = (ni % 7 == 3) ? 16'sh8000 : sample_t'($urandom);
      q_valid = ($urandom_range(2) == 0); q_data = (nq % 7 == 2) ? 16'sh8000 : sample_t'($urandom);
      out_ready = ($urandom_range(2) != 0);
      #1;
      checks++;
      if (out_valid != (iq.size() > 0 && qq.size() > 0)) begin failures++; $display("valid wrong"); end
      if (out_valid && out_ready) begin
        int e;
        case (no % 4) 0: e = qq[0]; 1: e = iq[0]; 2: e = ns(qq[0]); default: e = ns(iq[0]); endcase
        checks++;
        if (int'(out_data) != e) begin failures++; $display("out %0d: %0d expected %0d", no, out_data, e); end
        void'(iq.pop_front()); void'(qq.pop_front()); no++;
      end
      if (i_valid && i_ready) begin iq.push_back(i_data); ni++; end
      if (q_valid && q_ready) begin qq.push_back(q_data); nq++; end
    end
    checks++; if (no < 100) begin failures++; $display("too few outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
