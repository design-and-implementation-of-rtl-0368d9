// tb_band_adder: checks the equalizer output adder with a reduced band
// count (4). Random band samples, some of them at the rails so that the sum
// saturates in both directions, are applied on random clocks; each output
// must appear one clock after the strobe and equal the independently
// computed saturated sum. Between strobes the output must hold its value.
module tb_band_adder;
  import lpeq_pkg::*;

  localparam int NB = 4;
  localparam int NT = 3000;

  logic    clk = 0, rst_n = 0;
  logic    in_valid [NB];
  sample_t in_data  [NB];
  logic    out_valid;
  sample_t out_data;

  band_adder #(.NBANDS(NB)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_pos_sat = 0, n_neg_sat = 0;
  int exp_q [$];
  int last_out = 0;

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output side: compare on every clock.
  bit pend = 0;
  int pend_val;
  always @(posedge clk) if (rst_n) begin
    #1;
    checks++;
    if (out_valid !== pend) begin
      failures++;
      $display("out_valid %0b, expected %0b", out_valid, pend);
    end else if (out_data != sample_t'(pend ? pend_val : last_out)) begin
      failures++;
      if (failures < 10) $display("out_data %0d, expected %0d", out_data, pend ? pend_val : last_out);
    end
    if (pend) last_out = pend_val;
    pend = 0;
  end

  initial begin
    for (int b = 0; b < NB; b++) begin in_valid[b] = 0; in_data[b] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      bit v;
      longint s;
      @(negedge clk);
      v = ($urandom_range(2) != 0);
      s = 0;
      for (int b = 0; b < NB; b++) begin
        int d;
        case ($urandom_range(5))
          0: d = 32767;
          1: d = -32768;
          default: d = int'($urandom_range(65535)) - 32768;
        endcase
        in_valid[b] = v;
        in_data[b]  = sample_t'(d);
        s += d;
      end
      if (v) begin
        pend_val = (s > 32767) ? 32767 : (s < -32768) ? -32768 : int'(s);
        if (s > 32767) n_pos_sat++;
        if (s < -32768) n_neg_sat++;
        // pend is picked up by the checker at the next posedge
        @(posedge clk); pend = 1;
      end
    end
    @(negedge clk);
    for (int b = 0; b < NB; b++) in_valid[b] = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (n_pos_sat == 0 || n_neg_sat == 0) begin failures++; $display("saturation not exercised"); end
    $display("positive saturations %0d negative %0d", n_pos_sat, n_neg_sat);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
