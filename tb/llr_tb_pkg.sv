// llr_tb_pkg: behavioural models used by the demapper testbenches.
//
// 1. A model of the offline table generator: DVB-S2-style constellations for
//    QPSK, 8PSK, 16APSK and 32APSK, the MAX-log LLR of each bit,
//      LLR_k(r) = [max_{s: bit k = 1} -|r-s|^2 - max_{s: bit k = 0} -|r-s|^2] / (2 sigma^2)
//    evaluated on the LUT grid, scaled per bit so that the largest magnitude
//    on the grid is 31, clipped to [-32, 31] and rounded to integers.
//    Ring radii use an outer power level of 90 (49*sqrt(2) for QPSK, 86 for
//    8PSK) and ring ratios 2.70 (16APSK) and 2.64 / 4.64 (32APSK). The
//    assignment of bit labels to the 16APSK and 32APSK points is a simple
//    ring-by-ring numbering, not the standard's Gray labels; the demapper is
//    independent of the labels because they only live in the table.
// 2. A reference model of the interpolation: the LLR at (I, Q) from the four
//    corner values, computed in floating point (ref_llr_real), then rounded
//    half away from zero and saturated to 6 bits (ref_llr).
package llr_tb_pkg;

  localparam real PI = 3.14159265358979323846;

  // Noise variance used for each BPS when the tables were made.
  function automatic real variance(int bps);
    case (bps)
      2: return 6964.5;
      3: return 1742.76;
      4: return 832.07593;
      default: return 259.93593;
    endcase
  endfunction

  // Constellation point 'idx' of modulation 'bps': I in re, Q in im.
  function automatic void const_point(int bps, int idx, output real re, output real im);
    real r, a;
    case (bps)
      2: begin
        r = 49.0 * $sqrt(2.0);
        re = (idx[1] ? -1.0 : 1.0) * r / $sqrt(2.0);
        im = (idx[0] ? -1.0 : 1.0) * r / $sqrt(2.0);
        return;
      end
      3: begin
        real ang [8] = '{PI/4, 0.0, PI, 5*PI/4, PI/2, 7*PI/4, 3*PI/4, 3*PI/2};
        r = 86.0; a = ang[idx];
      end
      4: begin
        if (idx < 12) begin r = 90.0; a = PI/12 + idx*PI/6; end
        else begin r = 90.0/2.70; a = PI/4 + (idx-12)*PI/2; end
      end
      default: begin
        if (idx < 16) begin r = 90.0; a = idx*PI/8; end
        else if (idx < 28) begin r = 90.0*2.64/4.64; a = PI/12 + (idx-16)*PI/6; end
        else begin r = 90.0/4.64; a = PI/4 + (idx-28)*PI/2; end
      end
    endcase
    re = r * $cos(a);
    im = r * $sin(a);
  endfunction

  // Unscaled MAX-log LLR of bit 'k' at the received point (x, y).
  function automatic real max_llr(int bps, int k, real x, real y);
    real best1, best0, sr, si, p;
    best1 = -1.0e30; best0 = -1.0e30;
    for (int s = 0; s < (1 << bps); s++) begin
      const_point(bps, s, sr, si);
      p = -((x-sr)*(x-sr) + (y-si)*(y-si));
      if (s[k]) begin if (p > best1) best1 = p; end
      else      begin if (p > best0) best0 = p; end
    end
    return (best1 - best0) / (2.0 * variance(bps));
  endfunction

  function automatic int round_away(real v);
    if (v >= 0.0) return int'($floor(v + 0.5));
    else          return -int'($floor(-v + 0.5));
  endfunction

  function automatic int sat(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  // Signed value represented by grid index 'g' of an lut_w-bit grid.
  function automatic int grid_value(int g, int lut_w, int din_w);
    int s;
    s = (g >= (1 << (lut_w-1))) ? g - (1 << lut_w) : g;
    return s * (1 << (din_w - lut_w));
  endfunction

  // Builds the table of one modulation: tbl[addr][k], addr = {Q idx, I idx}.
  function automatic void build_lut(int bps, int lut_w, int din_w, int max_bps,
                                    ref int tbl [][]);
    int n;
    real raw [][];
    real mx [];
    n = 1 << (2*lut_w);
    tbl = new[n];
    raw = new[n];
    mx  = new[max_bps];
    for (int k = 0; k < max_bps; k++) mx[k] = 0.0;
    for (int a = 0; a < n; a++) begin
      int gi, gq;
      gi = a % (1 << lut_w);
      gq = a / (1 << lut_w);
      raw[a] = new[max_bps];
      tbl[a] = new[max_bps];
      for (int k = 0; k < max_bps; k++) begin
        raw[a][k] = (k < bps) ? max_llr(bps, k, real'(grid_value(gi, lut_w, din_w)),
                                        real'(grid_value(gq, lut_w, din_w))) : 0.0;
        if (raw[a][k] > mx[k]) mx[k] = raw[a][k];
        if (-raw[a][k] > mx[k]) mx[k] = -raw[a][k];
      end
    end
    for (int a = 0; a < n; a++)
      for (int k = 0; k < max_bps; k++) begin
        real v;
        v = (mx[k] > 0.0) ? raw[a][k] * 31.0 / mx[k] : 0.0;
        if (v > 31.0) v = 31.0;
        if (v < -32.0) v = -32.0;
        tbl[a][k] = round_away(v);
      end
  endfunction

  // Reference LLR of bit k at received (i_raw, q_raw) (two's complement
  // din_w-bit codes) from the table, following the interpolation equations.
  function automatic real ref_llr_real(ref int tbl [][], input int k, int i_raw, int q_raw,
                                       int lut_w, int din_w);
    int f, gi1, gq1, gi2, gq2, top, iv, qv, i1, q1;
    real x11, x21, x12, x22, r1, r2, p, wi, wq, step;
    f   = din_w - lut_w;
    top = (1 << (lut_w-1)) - 1;
    gi1 = i_raw >> f;
    gq1 = q_raw >> f;
    gi2 = (gi1 == top) ? gi1 : (gi1 + 1) % (1 << lut_w);
    gq2 = (gq1 == top) ? gq1 : (gq1 + 1) % (1 << lut_w);
    iv  = (i_raw >= (1 << (din_w-1))) ? i_raw - (1 << din_w) : i_raw;
    qv  = (q_raw >= (1 << (din_w-1))) ? q_raw - (1 << din_w) : q_raw;
    i1  = grid_value(gi1, lut_w, din_w);
    q1  = grid_value(gq1, lut_w, din_w);
    step = real'(1 << f);
    wi  = real'(iv - i1) / step;      // fraction of the way to the upper I point
    wq  = real'(qv - q1) / step;
    x11 = real'(tbl[(gq1 << lut_w) | gi1][k]);
    x21 = real'(tbl[(gq1 << lut_w) | gi2][k]);
    x12 = real'(tbl[(gq2 << lut_w) | gi1][k]);
    x22 = real'(tbl[(gq2 << lut_w) | gi2][k]);
    r1  = (1.0 - wi) * x11 + wi * x21;
    r2  = (1.0 - wi) * x12 + wi * x22;
    p   = (1.0 - wq) * r1 + wq * r2;
    return p;
  endfunction

  function automatic int ref_llr(ref int tbl [][], input int k, int i_raw, int q_raw,
                                 int lut_w, int din_w, int dout_w);
    return sat(round_away(ref_llr_real(tbl, k, i_raw, q_raw, lut_w, din_w)),
               -(1 << (dout_w-1)), (1 << (dout_w-1)) - 1);
  endfunction

endpackage
