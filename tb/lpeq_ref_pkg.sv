// lpeq_ref_pkg: reference model of one equalizer band, for testbenches.
// It computes the band output sequence from the input sequence by the
// textbook definitions, independently of the RTL: full impulse responses
// rebuilt from the half tables and direct convolution (no pre-addition),
// decimation by keeping every M-th output, interpolation by inserting zeros
// and multiplying by the factor, the 0,1,0,-1 / 1,0,-1,0 centre modulators,
// and the same number formats (round half up, saturation to 16 bits).
package lpeq_ref_pkg;

  typedef int iq_t [$];
  typedef iq_t coefset_t [14];    // half tables of h1..h13 (index 0 unused)

  // default structure: lengths of h1 h2 h3 h7 h8 h9 h10, factor per stage
  localparam int LH [7] = '{15, 31, 63, 79, 47, 31, 15};
  localparam int MF = 2;

  // structure used by flen and band_model; a testbench of a band built with
  // other lengths or rate factors sets these before using the model
  int lh_v [7] = LH;            // lengths of h1 h2 h3 h7 h8 h9 h10
  int md_v [3] = '{MF, MF, MF}; // decimation factors M1 M2 M3
  int mu_v [3] = '{MF, MF, MF}; // interpolation factors L1 L2 L3
  int lowd_v = 0;               // zero samples put before h7 (low-rate delay)

  function automatic int flen(int f);
    case (f)
      1, 4:  return lh_v[0];
      2, 5:  return lh_v[1];
      3, 6:  return lh_v[2];
      7:     return lh_v[3];
      8, 11: return lh_v[4];
      9, 12: return lh_v[5];
      default: return lh_v[6];
    endcase
  endfunction

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  function automatic longint rsh(longint v, int f);
    return (v + (longint'(1) << (f - 1))) >>> f;
  endfunction

  function automatic int cf(iq_t h, int len, int l);
    return (l < (len + 1) / 2) ? h[l] : h[len - 1 - l];
  endfunction

  function automatic iq_t fir_dec(iq_t x, iq_t h, int len, int d);
    iq_t y;
    for (int m = 0; m * d < x.size(); m++) begin
      longint acc = 0;
      for (int l = 0; l < len; l++)
        if (m * d - l >= 0) acc += longint'(cf(h, len, l)) * x[m * d - l];
      y.push_back(sat16(rsh(acc, 15)));
    end
    return y;
  endfunction

  function automatic iq_t fir_int(iq_t x, iq_t h, int len, int up);
    iq_t v, y;
    foreach (x[i]) begin
      v.push_back(x[i]);
      for (int z = 1; z < up; z++) v.push_back(0);
    end
    foreach (v[n]) begin
      longint acc = 0;
      for (int l = 0; l < len; l++)
        if (n - l >= 0) acc += longint'(cf(h, len, l)) * v[n - l];
      y.push_back(sat16(rsh(acc, 15) * up));
    end
    return y;
  endfunction

  function automatic iq_t band_model(iq_t u, coefset_t coef, iq_t cos_t, iq_t sin_t, int gain);
    iq_t xi, xq, c, g, si, sq, oi, oq, y;
    int t = cos_t.size();
    foreach (u[k]) begin
      xi.push_back(sat16(rsh(longint'(u[k]) * cos_t[k % t], 14)));
      xq.push_back(sat16(rsh(longint'(u[k]) * sin_t[k % t], 14)));
    end
    xi = fir_dec(fir_dec(fir_dec(xi, coef[1], lh_v[0], md_v[0]), coef[2], lh_v[1], md_v[1]), coef[3], lh_v[2], md_v[2]);
    xq = fir_dec(fir_dec(fir_dec(xq, coef[4], lh_v[0], md_v[0]), coef[5], lh_v[1], md_v[1]), coef[6], lh_v[2], md_v[2]);
    foreach (xi[n])
      case (n % 4)
        0: c.push_back(xq[n]);
        1: c.push_back(xi[n]);
        2: c.push_back(sat16(-longint'(xq[n])));
        default: c.push_back(sat16(-longint'(xi[n])));
      endcase
    for (int z = 0; z < lowd_v; z++) c.push_front(0);
    c = fir_dec(c, coef[7], lh_v[3], 1);
    foreach (c[n]) g.push_back(sat16(rsh(longint'(c[n]) * gain, 14)));
    foreach (g[n]) begin
      int neg = sat16(-longint'(g[n]));
      si.push_back((n % 4 == 1) ? g[n] : (n % 4 == 3) ? neg : 0);
      sq.push_back((n % 4 == 0) ? g[n] : (n % 4 == 2) ? neg : 0);
    end
    oi = fir_int(fir_int(fir_int(si, coef[8],  lh_v[4], mu_v[0]), coef[9],  lh_v[5], mu_v[1]), coef[10], lh_v[6], mu_v[2]);
    oq = fir_int(fir_int(fir_int(sq, coef[11], lh_v[4], mu_v[0]), coef[12], lh_v[5], mu_v[1]), coef[13], lh_v[6], mu_v[2]);
    foreach (oi[k])
      y.push_back(sat16(rsh(longint'(oi[k]) * cos_t[k % t] + longint'(oq[k]) * sin_t[k % t], 14)));
    return y;
  endfunction

  // Test filters: a triangular low-pass with a DC gain of 0.99, with a
  // small random change to every coefficient so that no two filters are
  // alike; the bandpass h7 is the same shape moved to a quarter of its
  // sample rate (multiplied by 4*cos(pi*(l-c)/2), c the centre tap), which
  // gives it a passband gain of 2: the two 0,1,0,-1 modulators around it
  // halve the signal, so the band as a whole has a gain of one.
  function automatic int design_coef(int f, int len, int j);
    real c = (len - 1) / 2.0;
    real sumw = 0.0, w;
    for (int l = 0; l < len; l++) sumw += (c + 1.0) - ((l > c) ? l - c : c - l);
    w = ((c + 1.0) - (c - j)) / sumw * 0.99 * 32768.0;
    if (f == 7) w = w * 4.0 * $cos(3.14159265358979 / 2.0 * (j - c));
    return int'($rtoi($floor(w + 0.5))) + int'($urandom_range(20)) - 10;
  endfunction

endpackage
