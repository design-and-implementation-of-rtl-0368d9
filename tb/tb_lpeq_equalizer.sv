// tb_lpeq_equalizer: end-to-end test of the whole equalizer at its default
// parameters: ten bands, 25 MHz clock, one input sample every 566 clocks
// (44.1 kHz).
//
// Every band gets its own centre frequency (table of 48 entries, centre
// (b+1)/48 of fs for band b, except that band 4 repeats the centre of band
// 3), its own gain and its own slightly randomised test filters. The input
// is a full-scale tone burst at the centre of bands 3 and 4, whose gains are
// near 2, so that the band sum saturates; then a weaker tone plus noise.
// The expected output is the saturated sum of the ten band outputs given
// by the reference model in lpeq_ref_pkg, and every output sample is
// compared with it. At the nominal rate no input may be dropped and no
// output may be missing; a second phase strobes far too fast so that
// overrun and underrun occur. Counted mechanisms, each of which must
// occur: decimation store-only jobs, interpolation zero insertion, a stage
// held back by a full consumer, saturation of the band sum, overrun and
// underrun.
module tb_lpeq_equalizer;
  import lpeq_pkg::*;
  import lpeq_ref_pkg::*;

  localparam int NB       = 10;
  localparam int PER      = 566;
  localparam int NS       = 1200;
  localparam int NFAST    = 200;
  localparam int FAST_PER = 40;
  localparam int T_LEN    = 48;

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        in_valid = 0;
  sample_t     in_data  = '0;
  logic        out_valid, ready, overrun, underrun;
  sample_t     out_data;
  logic        cfg_we = 0;
  logic [3:0]  cfg_band = '0;
  logic [15:0] cfg_addr = '0, cfg_wdata = '0;

  lpeq_equalizer dut (.*);

  int checks = 0, failures = 0;
  bit done_flag = 0;

  coefset_t coef [NB];
  iq_t cos_t [NB], sin_t [NB];
  int  gain [NB];
  iq_t u, y_ref;

  localparam int E_NS [4]    = '{4, 5, 2, 2};
  localparam int E_F  [4][5] = '{'{1, 4, 2, 5, 0}, '{3, 6, 7, 8, 11}, '{9, 12, 0, 0, 0}, '{10, 13, 0, 0, 0}};

  task automatic cfg(input int b, input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_band = 4'(b); cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic program_band(input int b);
    for (int e = 0; e < 4; e++) begin
      int base = 0;
      for (int s = 0; s < E_NS[e]; s++) begin
        int f = E_F[e][s];
        int h = (flen(f) + 1) / 2;
        coef[b][f] = {};
        for (int j = 0; j < h; j++) begin
          int v = design_coef(f, flen(f), j);
          coef[b][f].push_back(v);
          cfg(b, 16'((e << 12) | (base + j)), 16'(v));
        end
        base += h;
      end
    end
    for (int k = 0; k < T_LEN; k++) begin
      real w = 2.0 * 3.14159265358979 * ((b == 4) ? 4 : b + 1) * k / T_LEN;
      cos_t[b].push_back(int'($rtoi($floor(1.41421356 * $cos(w) * 16384.0 + 0.5))));
      sin_t[b].push_back(int'($rtoi($floor(1.41421356 * $sin(w) * 16384.0 + 0.5))));
      cfg(b, 16'(16'h4000 | k), 16'(cos_t[b][k]));
      cfg(b, 16'(16'h5000 | k), 16'(sin_t[b][k]));
    end
    cfg(b, 16'h6000, 16'(T_LEN));
    gain[b] = (b == 3 || b == 4) ? 30000 : 8192 + 1638 * b;
    cfg(b, 16'h7000, 16'(gain[b]));
  endtask

  int n_store_only = 0, n_zero_ins = 0, n_stall = 0, n_sat = 0;
  int n_overrun = 0, n_underrun = 0, n_out = 0, n_compared = 0;
  bit nominal = 1;

  always @(posedge clk) if (rst_n) begin
    if (dut.g_band[3].u_band.u_e1.pick && !dut.g_band[3].u_band.u_e1.pcomp) n_store_only++;
    if (dut.g_band[3].u_band.u_e3.pick && dut.g_band[3].u_band.u_e3.pzero) n_zero_ins++;
    for (int s = 0; s < 2; s++)
      if (!dut.g_band[3].u_band.u_e4.busy && dut.g_band[3].u_band.u_e4.f_valid[s]
          && !dut.g_band[3].u_band.u_e4.out_ready[s])
        n_stall++;
    if (out_valid && nominal && (out_data == 32767 || out_data == -32768)) n_sat++;
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
    repeat (NS * PER + NFAST * FAST_PER + 400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end

  initial begin
    iq_t yb [NB];
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) program_band(b);
    wait (ready);
    for (int k = 0; k < NS; k++)
      u.push_back((k < 300) ? int'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * 4 * k / T_LEN))))
                            : int'($rtoi($floor(6000.0 * $cos(2.0 * 3.14159265358979 * 4 * k / T_LEN))))
                             + int'($urandom_range(4000)) - 2000);
    for (int b = 0; b < NB; b++) yb[b] = band_model(u, coef[b], cos_t[b], sin_t[b], gain[b]);
    for (int k = 0; k < NS; k++) begin
      longint s;
      s = 0;
      for (int b = 0; b < NB; b++) s += yb[b][k];
      y_ref.push_back(sat16(s));
    end
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      in_valid = 1; in_data = sample_t'(u[k]);
      @(negedge clk);
      in_valid = 0;
      repeat (PER - 2) @(negedge clk);
    end
    checks++; if (n_overrun != 0)  begin failures++; $display("overrun at nominal rate"); end
    checks++; if (n_underrun != 0) begin failures++; $display("underrun at nominal rate"); end
    checks++; if (n_compared < NS - 3 * 8) begin failures++; $display("only %0d outputs", n_compared); end
    $display("nominal: %0d outputs compared", n_compared);
    nominal = 0;
    for (int k = 0; k < NFAST; k++) begin
      @(negedge clk);
      in_valid = 1; in_data = sample_t'($urandom);
      @(negedge clk);
      in_valid = 0;
      repeat (FAST_PER - 2) @(negedge clk);
    end
    $display("store-only %0d zero-insert %0d stall %0d sat %0d overrun %0d underrun %0d",
             n_store_only, n_zero_ins, n_stall, n_sat, n_overrun, n_underrun);
    checks++; if (n_store_only == 0) begin failures++; $display("no store-only job"); end
    checks++; if (n_zero_ins   == 0) begin failures++; $display("no zero insertion"); end
    checks++; if (n_stall      == 0) begin failures++; $display("no stall"); end
    checks++; if (n_sat        == 0) begin failures++; $display("no saturation of the sum"); end
    checks++; if (n_overrun    == 0) begin failures++; $display("no overrun"); end
    checks++; if (n_underrun   == 0) begin failures++; $display("no underrun"); end
    finish();
  end

endmodule
