// tb_quad_demodulator: I and Q samples arrive at random times; the
// testbench plays the table. Expected output k, worked out here:
// sat(round((I*cos(k mod len) + Q*sin(k mod len)) / 2^14)).
module tb_quad_demodulator;
  import lpeq_pkg::*;
  localparam int AW = 4, T = 10;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic i_valid = 0, i_ready, q_valid = 0, q_ready, out_valid, out_ready = 0;
  sample_t i_data = '0, q_data = '0, out_data;
  logic [AW:0] len = (AW+1)'(T);
  logic [AW-1:0] tab_idx;
  tab_t tab_cos, tab_sin, ct [16], st [16];
  int checks = 0, failures = 0, no = 0;
  int iq [$], qq [$];

  assign tab_cos = ct[tab_idx];
  assign tab_sin = st[tab_idx];
  quad_demodulator #(.AW(AW)) dut (.*);

  function automatic int rs(longint v);
    v = (v + 8192) >>> 14;
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin ct[i] = tab_t'($urandom); st[i] = tab_t'($urandom); end
    ct[3] = 16'sh8000; st[3] = 16'sh8000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 4000; c++) begin
      @(negedge clk);
      i_valid = ($urandom_range(2) == 0); i_data = (c % 13 == 0) ? 16'sh8000 : sample_t'($urandom);
      q_valid = ($urandom_range(2) == 0); q_data = (c % 13 == 0) ? 16'sh8000 : sample_t'($urandom);
      out_ready = ($urandom_range(2) != 0);
      #1;
      checks++;
      if (out_valid != (iq.size() > 0 && qq.size() > 0)) begin failures++; $display("valid wrong"); end
      if (out_valid && out_ready) begin
        int k;
        k = no % T;
        checks++;
        if (tab_idx != AW'(k) || int'(out_data) != rs(longint'(iq[0]) * ct[k] + longint'(qq[0]) * st[k])) begin
          failures++; $display("out %0d: %0d", no, out_data);
        end
        void'(iq.pop_front()); void'(qq.pop_front()); no++;
      end
      if (i_valid && i_ready) iq.push_back(i_data);
      if (q_valid && q_ready) qq.push_back(q_data);
    end
    checks++; if (no < 100) begin failures++; $display("too few outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
