// tb_lpeq_equalizer_mixed: the equalizer with bands of different structure
// and the delay equalisation between them. Three bands: band 0, a low band,
// is built with total decimation 16 (M1 = 4, L3 = 4) and longer h1, h7 and
// h10; bands 1 and 2 have the default structure (total decimation 8) and
// so a shorter delay, which they make up with a coarse delay at their
// lowest rate (LOW_DELAY, 56 samples there, 448 audio samples) and a fine
// delay after the band (DELAY, 38 audio samples).
//
// The reference model gives each band's output sequence y_b, whose impulse
// response is symmetric about GD_b input samples (worked out from the
// filter lengths, rate factors and the coarse delay). The testbench
// measures at which input strobe S_b each band delivers y_b[0] and checks:
//  - every band output, bit for bit, against its model;
//  - the delay equalisation: S_b + GD_b + DELAY[b] is the same for every
//    band, so all bands are symmetric about the same instant;
//  - every equalizer output against the saturated sum of the band models,
//    each delayed by its DELAY, zero before a band has started;
//  - no overrun and no underrun at one sample per 566 clocks.
module tb_lpeq_equalizer_mixed;
  import lpeq_pkg::*;
  import lpeq_ref_pkg::*;

  localparam int NB    = 3;
  localparam int PER   = 566;
  localparam int NS    = 2600;
  localparam int T_LEN = 48;
  // delay equalisation of the two default bands: coarse LDQ samples at
  // their lowest rate (LDQ * 8 audio samples), fine DEQ audio samples
  localparam int LDQ   = 56;
  // DEQ = (19 + 1074) - (5 + 1050): start strobes of the two structures
  // (the preloaded zeros make the default bands start earlier) and their
  // model delays
  localparam int DEQ   = 38;

  localparam band_arr_t P_M1  = '{0: 4, default: 2};
  localparam band_arr_t P_L3  = '{0: 4, default: 2};
  localparam band_arr_t P_H1  = '{0: 31, default: 15};
  localparam band_arr_t P_H7  = '{0: 63, default: 79};
  localparam band_arr_t P_H10 = '{0: 23, default: 15};
  localparam band_arr_t P_LDL = '{0: 0, default: LDQ};
  localparam band_arr_t P_DEL = '{0: 0, default: DEQ};

  logic clk = 0, rst_n = 0;
  always #1 clk = ~clk;

  logic        in_valid = 0;
  sample_t     in_data  = '0;
  logic        out_valid, ready, overrun, underrun;
  sample_t     out_data;
  logic        cfg_we = 0;
  logic [3:0]  cfg_band = '0;
  logic [15:0] cfg_addr = '0, cfg_wdata = '0;

  lpeq_equalizer #(
    .NBANDS(NB), .M1(P_M1), .L3(P_L3), .LEN_H1(P_H1), .LEN_H7(P_H7),
    .LEN_H10(P_H10), .LOW_DELAY(P_LDL), .DELAY(P_DEL)
  ) dut (.*);

  int checks = 0, failures = 0;
  bit done_flag = 0;

  coefset_t coef [NB];
  iq_t cos_t [NB], sin_t [NB], yb [NB];
  int  gain [NB];
  int  gd [NB];
  iq_t u;

  localparam int E_NS [4]    = '{4, 5, 2, 2};
  localparam int E_F  [4][5] = '{'{1, 4, 2, 5, 0}, '{3, 6, 7, 8, 11}, '{9, 12, 0, 0, 0}, '{10, 13, 0, 0, 0}};

  // set the reference model to the structure of band b; returns its delay
  function automatic int use_structure(int b);
    lh_v = '{int'(P_H1[b]), 31, 63, int'(P_H7[b]), 47, 31, int'(P_H10[b])};
    md_v = '{int'(P_M1[b]), 2, 2};
    mu_v = '{2, 2, int'(P_L3[b])};
    lowd_v = int'(P_LDL[b]);
    begin
      int mt, d;
      mt = md_v[0] * md_v[1] * md_v[2];
      d = (lh_v[0] - 1) / 2 + (lh_v[1] - 1) / 2 * md_v[0] + (lh_v[2] - 1) / 2 * md_v[0] * md_v[1]
        + (lh_v[3] - 1) / 2 * mt
        + (lh_v[4] - 1) / 2 * (mt / mu_v[0]) + (lh_v[5] - 1) / 2 * (mt / (mu_v[0] * mu_v[1]))
        + (lh_v[6] - 1) / 2 + lowd_v * mt;
      return d;
    end
  endfunction

  task automatic cfg(input int b, input logic [15:0] a, input logic [15:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_band = 4'(b); cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic program_band(input int b);
    gd[b] = use_structure(b);
    for (int e = 0; e < 4; e++) begin
      int base;
      base = 0;
      for (int s = 0; s < E_NS[e]; s++) begin
        int f, h;
        f = E_F[e][s];
        h = (flen(f) + 1) / 2;
        coef[b][f] = {};
        for (int j = 0; j < h; j++) begin
          int v;
          v = design_coef(f, flen(f), j);
          coef[b][f].push_back(v);
          cfg(b, 16'((e << 12) | (base + j)), 16'(v));
        end
        base += h;
      end
    end
    for (int k = 0; k < T_LEN; k++) begin
      real w;
      w = 2.0 * 3.14159265358979 * (2 * b + 1) * k / T_LEN;
      cos_t[b].push_back(int'($rtoi($floor(1.41421356 * $cos(w) * 16384.0 + 0.5))));
      sin_t[b].push_back(int'($rtoi($floor(1.41421356 * $sin(w) * 16384.0 + 0.5))));
      cfg(b, 16'(16'h4000 | k), 16'(cos_t[b][k]));
      cfg(b, 16'(16'h5000 | k), 16'(sin_t[b][k]));
    end
    cfg(b, 16'h6000, 16'(T_LEN));
    gain[b] = 12000 + 3000 * b;
    cfg(b, 16'h7000, 16'(gain[b]));
  endtask

  // ------------------------------------------------------------ monitors
  int k_cur = -1;              // index of the last input strobe
  int s_b [NB] = '{-1, -1, -1};
  int n_b [NB] = '{0, 0, 0};
  int n_out = 0, n_overrun = 0, n_underrun = 0, k_first = -1;
  logic    bv [NB];
  sample_t bd [NB];
  for (genvar g = 0; g < NB; g++) begin : g_tap
    assign bv[g] = dut.g_band[g].u_band.out_valid;
    assign bd[g] = dut.g_band[g].u_band.out_data;
  end

  function automatic int band_at(int b, int k);
    // sample of band b entering its delay line at strobe k
    if (s_b[b] < 0 || k < s_b[b]) return 0;
    return yb[b][k - s_b[b]];
  endfunction

  always @(posedge clk) if (rst_n) begin
    if (in_valid) k_cur++;
    if (overrun)  n_overrun++;
    if (underrun) n_underrun++;
    for (int b = 0; b < NB; b++)
      if (bv[b]) begin
        if (s_b[b] < 0) s_b[b] = k_cur;
        checks++;
        if (int'(bd[b]) != yb[b][n_b[b]]) begin
          failures++;
          if (failures < 10) $display("band %0d output %0d: got %0d expected %0d", b, n_b[b],
                                      bd[b], yb[b][n_b[b]]);
        end
        n_b[b]++;
      end
    if (out_valid) begin
      longint s;
      int kr;
      if (k_first < 0) k_first = k_cur;
      s = 0;
      for (int b = 0; b < NB; b++) begin
        // the delay lines run from the first band output on
        kr = k_cur - int'(P_DEL[b]);
        if (kr >= k_first) s += band_at(b, kr);
      end
      checks++;
      if (int'(out_data) != sat16(s)) begin
        failures++;
        if (failures < 10) $display("equalizer output at strobe %0d: got %0d expected %0d", k_cur, out_data, sat16(s));
      end
      n_out++;
    end
  end

  task automatic finish();
    if (!done_flag) begin
      done_flag = 1;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  endtask

  initial begin
    repeat (NS * PER + 400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    finish();
  end

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NB; b++) program_band(b);
    wait (ready);
    for (int k = 0; k < NS; k++)
      u.push_back(int'($rtoi($floor(5000.0 * $cos(2.0 * 3.14159265358979 * 3 * k / T_LEN))))
                  + int'($urandom_range(8000)) - 4000);
    for (int b = 0; b < NB; b++) begin
      void'(use_structure(b));
      yb[b] = band_model(u, coef[b], cos_t[b], sin_t[b], gain[b]);
    end
    for (int k = 0; k < NS; k++) begin
      @(negedge clk);
      in_valid = 1; in_data = sample_t'(u[k]);
      @(negedge clk);
      in_valid = 0;
      repeat (PER - 2) @(negedge clk);
    end
    for (int b = 0; b < NB; b++)
      $display("band %0d: first output at strobe %0d, model delay %0d, extra delay %0d, total %0d",
               b, s_b[b], gd[b], P_DEL[b], s_b[b] + gd[b] + int'(P_DEL[b]));
    for (int b = 1; b < NB; b++) begin
      checks++;
      if (s_b[b] + gd[b] + int'(P_DEL[b]) != s_b[0] + gd[0] + int'(P_DEL[0])) begin
        failures++; $display("band %0d not delay-equalised with band 0", b);
      end
    end
    checks++; if (n_overrun != 0)  begin failures++; $display("overrun at nominal rate"); end
    checks++; if (n_underrun != 0) begin failures++; $display("underrun at nominal rate"); end
    checks++;
    if (n_out < NS - k_first - 1) begin failures++; $display("only %0d equalizer outputs", n_out); end
    $display("%0d equalizer outputs compared", n_out);
    finish();
  end

endmodule
