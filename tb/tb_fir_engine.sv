// tb_fir_engine: one multiplier stage with three filters of different
// kinds: slot 0 decimates by 3 (even length 6), slot 1 interpolates by 2
// (odd length 7), slot 2 keeps the rate (odd length 5). Random symmetric
// responses are loaded, random samples are fed to all slots at random
// times and the consumers are ready at random times. Every output is
// compared with a direct convolution worked out here (full response, no
// pre-addition). The consumers are modelled as two-entry buffers that
// drain at random, so readiness really varies. The latency of a lone job is
// checked: one clock to store, SAMPLE_W+2 per coefficient, one to output.
module tb_fir_engine;
  import lpeq_pkg::*;
  localparam int NS = 3;
  localparam int LENS [NS] = '{6, 7, 5};
  localparam int DOWNS [NS] = '{3, 1, 1};
  localparam int UPS [NS] = '{1, 2, 1};
  localparam int NIN = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic    in_valid [NS], in_ready [NS], out_valid [NS], out_ready [NS];
  sample_t in_data [NS], out_data;
  logic cw_en = 0, init_done, busy;
  logic [9:0] cw_addr = '0;
  coef_t cw_data = '0;
  int checks = 0, failures = 0;

  fir_engine #(
    .NSLOT(NS), .LEN('{6, 7, 5, 0, 0, 0, 0, 0}), .DOWN('{3, 1, 1, 1, 1, 1, 1, 1}),
    .UP('{1, 2, 1, 1, 1, 1, 1, 1}), .FIFO_DEPTH(2), .CAW(10)
  ) dut (.*);

  typedef int iq_t [$];
  iq_t h [NS], x [NS], yexp [NS];
  int nout [NS];

  function automatic int sat16(longint v);
    return (v > 32767) ? 32767 : (v < -32768) ? -32768 : int'(v);
  endfunction

  function automatic iq_t model(iq_t xs, iq_t hh, int len, int d, int u);
    iq_t v, y;
    foreach (xs[i]) begin
      v.push_back(xs[i]);
      for (int z = 1; z < u; z++) v.push_back(0);
    end
    for (int n = 0; n < v.size(); n += d) begin
      longint acc = 0;
      for (int l = 0; l < len && l <= n; l++)
        acc += longint'(hh[(l < (len + 1) / 2) ? l : len - 1 - l]) * v[n - l];
      y.push_back(sat16(((acc + (1 << 14)) >>> 15) * u));
    end
    return y;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // consumers: two-entry buffers drained at random; compare
  bit drain_rand = 0;
  int n_block = 0;
  int ccount [NS] = '{0, 0, 0};
  always_comb for (int s = 0; s < NS; s++) out_ready[s] = (ccount[s] < 2);
  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < NS; s++) begin
      ccount[s] <= ccount[s] + int'(out_valid[s])
                   - int'(ccount[s] > 0 && (!drain_rand || $urandom_range(150) == 0));
      if (out_valid[s]) begin
        checks++;
        if (nout[s] >= yexp[s].size() || int'(out_data) != yexp[s][nout[s]]) begin
          failures++;
          if (failures < 10) $display("slot %0d out %0d: %0d", s, nout[s], out_data);
        end
        nout[s]++;
      end
      if (dut.f_valid[s] && !out_ready[s]) n_block++;
    end
  end

  int lat;
  initial begin
    int base;
    for (int s = 0; s < NS; s++) begin
      in_valid[s] = 0; in_data[s] = '0; nout[s] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    base = 0;
    for (int s = 0; s < NS; s++) begin
      for (int j = 0; j < (LENS[s] + 1) / 2; j++) begin
        int v;
        v = (s == 2 && j == 2) ? 32767 : int'($urandom_range(40000)) - 20000;
        h[s].push_back(v);
        @(negedge clk); cw_en = 1; cw_addr = 10'(base + j); cw_data = coef_t'(v);
      end
      base += (LENS[s] + 1) / 2;
    end
    @(negedge clk); cw_en = 0;
    wait (init_done);
    // a lone job on slot 2 for the latency check
    x[2].push_back(1000);
    @(negedge clk); in_valid[2] = 1; in_data[2] = 1000;
    @(negedge clk); in_valid[2] = 0;
    while (!dut.pick) @(negedge clk);
    lat = 0;
    while (!out_valid[2]) begin @(negedge clk); lat++; end
    checks++;
    if (lat != 3 * (SAMPLE_W + 2) + 2) begin failures++; $display("latency %0d", lat); end
    // the stream
    for (int s = 0; s < NS; s++) begin
      for (int k = (s == 2); k < NIN; k++) x[s].push_back((k % 9 == 4) ? -32768 : int'($urandom_range(65535)) - 32768);
      yexp[s] = model(x[s], h[s], LENS[s], DOWNS[s], UPS[s]);
    end
    fork
      for (int s = 0; s < NS; s++)
        fork
          automatic int ss = s;
          begin
            for (int k = (ss == 2); k < NIN; k++) begin
              @(negedge clk);
              while ($urandom_range(3) != 0) @(negedge clk);
              in_valid[ss] = 1; in_data[ss] = sample_t'(x[ss][k]);
              @(posedge clk);
              while (!in_ready[ss]) @(posedge clk);
              @(negedge clk); in_valid[ss] = 0;
            end
          end
        join_none
      begin
        drain_rand = 1;
        repeat (60000) @(negedge clk);
      end
    join_any
    wait fork;
    drain_rand = 0;
    repeat (2000) @(negedge clk);
    for (int s = 0; s < NS; s++) begin
      checks++;
      if (nout[s] != yexp[s].size()) begin
        failures++; $display("slot %0d gave %0d outputs, expected %0d", s, nout[s], yexp[s].size());
      end
    end
    checks++;
    if (n_block == 0) begin failures++; $display("no job was ever held back by a full consumer"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
