// tb_band_delay: checks the band delay line for a few delays (0, 1, 5 and
// 37 samples). Random samples are applied on random strobes; on every
// strobe the output, one clock later, must be the sample given DELAY
// strobes earlier, or zero while fewer than DELAY samples have been given.
// Between strobes out_valid must stay low.
module tb_band_delay;
  import lpeq_pkg::*;

  localparam int NT = 2000;
  localparam int ND = 4;
  localparam int DL [ND] = '{0, 1, 5, 37};

  logic    clk = 0, rst_n = 0;
  logic    in_valid = 0;
  sample_t in_data = '0;
  logic    out_valid [ND];
  sample_t out_data  [ND];

  for (genvar g = 0; g < ND; g++) begin : g_dut
    band_delay #(.DELAY(DL[g])) dut (
      .clk, .rst_n, .in_valid, .in_data, .out_valid(out_valid[g]), .out_data(out_data[g])
    );
  end

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int hist [$];

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < NT; t++) begin
      bit v;
      @(negedge clk);
      v = ($urandom_range(3) != 0);
      in_valid = v;
      in_data  = sample_t'($urandom);
      if (v) hist.push_back(int'(in_data));
      @(negedge clk);
      in_valid = 0;
      for (int g = 0; g < ND; g++) begin
        checks++;
        if (out_valid[g] !== v) begin
          failures++;
          $display("delay %0d: out_valid %0b, expected %0b", DL[g], out_valid[g], v);
        end else if (v) begin
          int n, e;
          n = hist.size() - 1 - DL[g];
          e = (n >= 0) ? hist[n] : 0;
          if (int'(out_data[g]) != e) begin
            failures++;
            if (failures < 10) $display("delay %0d strobe %0d: got %0d expected %0d", DL[g], hist.size() - 1, out_data[g], e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
