// tb_quad_modulator: the testbench plays the table (values chosen here,
// returned for the index the modulator asks for) and sends samples. It
// checks I = round(u*cos/2^14) and Q = round(u*sin/2^14) with saturation,
// the output one clock after the input, the index wrapping at len, and
// that a sample arriving while a branch is not ready is dropped with an
// overrun pulse while the index still advances.
module tb_quad_modulator;
  import lpeq_pkg::*;
  localparam int AW = 5, T = 12;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid = 0, i_valid, q_valid, i_ready = 1, q_ready = 1, overrun;
  sample_t in_data = '0, i_data, q_data;
  logic [AW:0] len = (AW+1)'(T);
  logic [AW-1:0] tab_idx;
  tab_t tab_cos, tab_sin;
  tab_t ct [32], st [32];
  int checks = 0, failures = 0, n_ov = 0, n_wrap = 0;

  assign tab_cos = ct[tab_idx];
  assign tab_sin = st[tab_idx];

  quad_modulator #(.AW(AW)) dut (.*);

  function automatic int rs(longint v);
    v = (v + 8192) >>> 14;
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  initial begin
    for (int i = 0; i < 32; i++) begin ct[i] = tab_t'($urandom); st[i] = tab_t'($urandom); end
    ct[0] = 16'sh7fff; st[0] = 16'sh8000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 300; k++) begin
      int idx;
      logic rdy;
      idx = k % T;
      rdy = ($urandom_range(9) != 0);
      @(negedge clk);
      in_valid = 1; in_data = (k % 5 == 0) ? 16'sh8000 : sample_t'($urandom);
      checks++;
      if (tab_idx != AW'(idx)) begin failures++; $display("index %0d expected %0d", tab_idx, idx); end
      if (idx == T - 1) n_wrap++;
      @(negedge clk);
      in_valid = 0; i_ready = rdy; q_ready = rdy || ($urandom_range(1) == 0);
      #1;
      checks++;
      if ((i_ready && q_ready) != i_valid || i_valid != q_valid || overrun != !(i_ready && q_ready)) begin
        failures++; $display("handshake at %0d", k);
      end
      if (overrun) n_ov++;
      if (i_valid) begin
        checks++;
        if (int'(i_data) != rs(longint'(in_data) * ct[idx]) || int'(q_data) != rs(longint'(in_data) * st[idx])) begin
          failures++; $display("sample %0d: %0d %0d", k, i_data, q_data);
        end
      end
      @(negedge clk);
      i_ready = 1; q_ready = 1;
      checks++; if (i_valid || overrun) begin failures++; $display("valid held"); end
    end
    checks++; if (n_ov == 0 || n_wrap == 0) begin failures++; $display("no overrun or wrap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
