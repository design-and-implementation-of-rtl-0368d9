// tb_lpeq_band_rates: the band test of tb_lpeq_band repeated with a band
// built with unequal rate factors and filter lengths, as a band at the low
// end of an octave equalizer needs: first decimation by 4 (M1 = 4, total
// 16), last interpolation by 4 (L3 = 4), h1 and h4 31 taps, h7 63 taps,
// h10 and h13 23 taps; the other settings are the defaults. These lengths
// keep every multiplier stage within the 566 clocks of a 44.1 kHz sample
// period at 25 MHz (the busiest, the last stage, needs 2 x 12 taps x 18
// clocks = 432 clocks per sample).
//
// As in tb_lpeq_band, every output sample is compared with the reference
// model (set to the same structure), the tone at the band centre must pass
// with the set gain, no input may be dropped and no output may be missing
// at the nominal rate, and the same mechanisms are counted: decimation
// store-only jobs, zero insertion, a stall of the last stage, modulator
// saturation, table wrap-around, overrun and underrun.
module tb_lpeq_band_rates;
  import lpeq_pkg::*;
  import lpeq_ref_pkg::*;

  localparam int PER      = 566;   // clocks per audio sample at 25 MHz
  localparam int NS       = 2800;  // samples in the nominal phase
  localparam int NFAST    = 200;
  localparam int FAST_PER = 40;
  localparam int T_LEN    = 48;
  localparam int T_P      = 5;
  localparam int GAIN     = 20480; // 1.25 in Q2.14
  localparam real TONE    = 8000.0;


  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        in_valid = 0;
  sample_t     in_data  = '0;
  logic        out_valid, ready, overrun, underrun;
  sample_t     out_data;
  logic        cfg_we = 0;
  logic [15:0] cfg_addr = '0, cfg_wdata = '0;

  lpeq_band #(
    .M1(4), .L3(4), .LEN_H1(31), .LEN_H7(63), .LEN_H10(23)
  ) dut (.*);

  int checks = 0, failures = 0;
  bit done_flag = 0;

  // ------------------------------------------------------------ reference
  coefset_t coef;
  iq_t cos_t, sin_t, u, y_ref;

  // ---------------------------------------------------------- configuration
  task automatic cfg(input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  // filter index per engine slot
  localparam int E_NS [4]      = '{4, 5, 2, 2};
  localparam int E_F  [4][5]   = '{'{1, 4, 2, 5, 0}, '{3, 6, 7, 8, 11}, '{9, 12, 0, 0, 0}, '{10, 13, 0, 0, 0}};
  task automatic program_all();
    for (int e = 0; e < 4; e++) begin
      int base = 0;
      for (int s = 0; s < E_NS[e]; s++) begin
        int f = E_F[e][s];
        int h = (flen(f) + 1) / 2;
        coef[f] = {};
        for (int j = 0; j < h; j++) begin
          int v = design_coef(f, flen(f), j);
          coef[f].push_back(v);
          cfg(16'((e << 12) | (base + j)), 16'(v));
        end
        base += h;
      end
    end
    for (int k = 0; k < T_LEN; k++) begin
      real w = 2.0 * 3.14159265358979 * T_P * k / T_LEN;
      cos_t.push_back(int'($rtoi($floor(1.41421356 * $cos(w) * 16384.0 + 0.5))));
      sin_t.push_back(int'($rtoi($floor(1.41421356 * $sin(w) * 16384.0 + 0.5))));
      cfg(16'(16'h4000 | k), 16'(cos_t[k]));
      cfg(16'(16'h5000 | k), 16'(sin_t[k]));
    end
    cfg(16'h6000, 16'(T_LEN));
    cfg(16'h7000, 16'(GAIN));
  endtask

  // ------------------------------------------------------------ counters
  int n_store_only = 0, n_zero_ins = 0, n_stall = 0, n_sat = 0, n_wrap = 0;
  int n_overrun = 0, n_underrun = 0, n_out = 0, n_compared = 0;
  bit nominal = 1;

  always @(posedge clk) if (rst_n) begin
    // decimating slot stores without computing
    for (int s = 0; s < 4; s++)
      if (dut.u_e1.pick && dut.u_e1.psel == 2'(s) && !dut.u_e1.pcomp) n_store_only++;
    if (dut.u_e4.pick && dut.u_e4.pzero) n_zero_ins++;
    // a waiting job held back because its consumer is full
    for (int s = 0; s < 2; s++)
      if (!dut.u_e4.busy && (dut.u_e4.f_valid[s] || dut.u_e4.ip[s] != 0)
          && !dut.u_e4.out_ready[s])
        n_stall++;
    if (dut.u_mod.v && (dut.u_mod.ri == 32767 || dut.u_mod.ri == -32768)) n_sat++;
    if (dut.u_dem.take && dut.u_dem.tab_idx == 6'(T_LEN - 1)) n_wrap++;
    if (overrun)  n_overrun++;
    if (underrun) n_underrun++;
    if (out_valid && nominal) begin
      checks++;
      if (n_out >= y_ref.size() || int'(out_data) != y_ref[n_out]) begin
        failures++;
        if (failures < 10)
          $display("mismatch output %0d: got %0d expected %0d", n_out, out_data,
                   (n_out < y_ref.size()) ? y_ref[n_out] : 99999);
      end
      n_compared++;
    end
    if (out_valid) n_out++;
  end

  task automatic finish();
    if (!done_flag) begin
      done_flag = 1;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  initial begin
    repeat (NS * PER + NFAST * FAST_PER + 200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end

  initial begin
    int ov_nominal, ur_nominal;
    repeat (5) @(negedge clk);
    rst_n = 1;
    lh_v = '{31, 31, 63, 63, 47, 31, 23};
    md_v = '{4, 2, 2};
    mu_v = '{2, 2, 4};
    program_all();
    wait (ready);
    // stimulus and its model
    // a full-scale burst, then a tone at the band centre with some noise
    for (int k = 0; k < NS; k++)
      u.push_back((k < 40) ? ((k % 2) ? 32767 : -32768)
                           : int'($rtoi($floor(TONE * $cos(2.0 * 3.14159265358979 * T_P * k / T_LEN + 0.3))))
                             + int'($urandom_range(2000)) - 1000);
    y_ref = band_model(u, coef, cos_t, sin_t, GAIN);
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      in_valid = 1; in_data = sample_t'(u[k]);
      @(negedge clk);
      in_valid = 0;
      repeat (PER - 2) @(negedge clk);
    end
    // real-time behaviour at the nominal rate
    ov_nominal = n_overrun;
    ur_nominal = n_underrun;
    checks++; if (ov_nominal != 0) begin failures++; $display("overrun at nominal rate: %0d", ov_nominal); end
    checks++; if (ur_nominal != 0) begin failures++; $display("underrun at nominal rate: %0d", ur_nominal); end
    checks++;
    if (n_compared < NS - 3 * 16) begin
      failures++; $display("only %0d outputs in %0d sample periods", n_compared, NS);
    end
    $display("nominal: %0d outputs compared", n_compared);
    // the tone at the centre of the band must pass with about the set gain
    begin
      real pw = 0.0, rms_out, rms_exp;
      for (int k = NS - 300; k < NS - 60; k++) pw += real'(y_ref[k]) * real'(y_ref[k]);
      rms_out = $sqrt(pw / 240.0);
      rms_exp = TONE / $sqrt(2.0) * GAIN / 16384.0;
      $display("band centre tone: output rms %0.1f, input rms times gain %0.1f", rms_out, rms_exp);
      checks++;
      if (rms_out < 0.8 * rms_exp || rms_out > 1.2 * rms_exp) begin
        failures++; $display("tone at the band centre not passed with the band gain");
      end
    end
    nominal = 0;
    // far too fast: must overrun the input and underrun the output
    for (int k = 0; k < NFAST; k++) begin
      @(negedge clk);
      in_valid = 1; in_data = sample_t'($urandom);
      @(negedge clk);
      in_valid = 0;
      repeat (FAST_PER - 2) @(negedge clk);
    end
    $display("store-only %0d zero-insert %0d stall %0d sat %0d wrap %0d overrun %0d underrun %0d",
             n_store_only, n_zero_ins, n_stall, n_sat, n_wrap, n_overrun, n_underrun);
    checks++; if (n_store_only == 0) begin failures++; $display("no decimation store-only job"); end
    checks++; if (n_zero_ins   == 0) begin failures++; $display("no zero insertion"); end
    checks++; if (n_stall      == 0) begin failures++; $display("no stall"); end
    checks++; if (n_sat        == 0) begin failures++; $display("no saturation"); end
    checks++; if (n_wrap       == 0) begin failures++; $display("no table wrap"); end
    checks++; if (n_overrun    == 0) begin failures++; $display("no overrun"); end
    checks++; if (n_underrun   == 0) begin failures++; $display("no underrun"); end
    finish();
  end

endmodule
