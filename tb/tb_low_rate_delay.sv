// tb_low_rate_delay: checks the low-rate delay for DELAY = 0, 4 and 12.
// Random samples are offered on random clocks and the output is taken on
// random clocks (both sides valid/ready). The sequence that leaves must be
// DELAY zeros followed by the offered samples in order, and no sample may
// be lost or repeated. The input side must be refused when the FIFO of
// DELAY+2 words is full (counted, must happen for each delay).
module tb_low_rate_delay;
  import lpeq_pkg::*;

  localparam int ND = 3;
  localparam int DL [ND] = '{0, 4, 12};
  localparam int NT = 4000;

  logic    clk = 0, rst_n = 0;
  logic    in_valid [ND], in_ready [ND], out_valid [ND], out_ready [ND];
  sample_t in_data [ND], out_data [ND];

  for (genvar g = 0; g < ND; g++) begin : g_dut
    low_rate_delay #(.DELAY(DL[g])) dut (
      .clk, .rst_n,
      .in_valid(in_valid[g]), .in_ready(in_ready[g]), .in_data(in_data[g]),
      .out_valid(out_valid[g]), .out_ready(out_ready[g]), .out_data(out_data[g])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int sent [ND][$];
  int n_recv [ND] = '{0, 0, 0};
  int n_full [ND] = '{0, 0, 0};

  initial begin
    repeat (NT + 1000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected k-th output sample of delay g
  function automatic int expected(int g, int k);
    if (k < DL[g]) return 0;
    return sent[g][k - DL[g]];
  endfunction

  always @(posedge clk) if (rst_n) begin
    for (int g = 0; g < ND; g++) begin
      if (in_valid[g] && in_ready[g]) sent[g].push_back(int'(in_data[g]));
      if (in_valid[g] && !in_ready[g]) n_full[g]++;
      if (out_valid[g] && out_ready[g]) begin
        checks++;
        if (n_recv[g] >= DL[g] + sent[g].size() || int'(out_data[g]) != expected(g, n_recv[g])) begin
          failures++;
          if (failures < 10) $display("delay %0d output %0d: got %0d", DL[g], n_recv[g], out_data[g]);
        end
        n_recv[g]++;
      end
    end
  end

  initial begin
    for (int g = 0; g < ND; g++) begin
      in_valid[g] = 0; in_data[g] = '0; out_ready[g] = 0;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      @(negedge clk);
      for (int g = 0; g < ND; g++) begin
        // phases: consumer slower than producer, then faster
        in_valid[g]  = ($urandom_range(99) < ((t < NT / 2) ? 70 : 30));
        in_data[g]   = sample_t'($urandom);
        out_ready[g] = ($urandom_range(99) < ((t < NT / 2) ? 40 : 80));
      end
    end
    @(negedge clk);
    for (int g = 0; g < ND; g++) begin
      in_valid[g] = 0; out_ready[g] = 1;
    end
    repeat (40) @(negedge clk);
    for (int g = 0; g < ND; g++) begin
      checks++;
      if (n_recv[g] != DL[g] + sent[g].size()) begin
        failures++; $display("delay %0d: %0d samples out, expected %0d", DL[g], n_recv[g], DL[g] + sent[g].size());
      end
      checks++;
      if (n_full[g] == 0) begin failures++; $display("delay %0d: never full", DL[g]); end
      $display("delay %0d: %0d samples, refused %0d times", DL[g], n_recv[g], n_full[g]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
