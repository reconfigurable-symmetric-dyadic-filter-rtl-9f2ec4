// Reference model for the SDF testbenches.
//
// Written independently of the RTL: the coefficient table is spelled out
// again here as full tap lists, and the wavelet decomposition is computed with
// plain integer arithmetic on dynamic arrays. Conventions (shared with the
// design's specification, not its code):
//   * wavelet 0 = LeGall 5/3, wavelet 1 = CDF 9/7; band 0 = low, 1 = high
//   * coefficients are integers scaled by 128
//   * low output n is centred on sample 2n, high output n on sample 2n+1
//   * whole-sample symmetric extension at both ends
//   * each output is floor((sum + 64) / 128) clipped to -256..255
package sdf_ref_pkg;

  // Full tap list of a filter, offsets -K..K.
  function automatic void taps(input int wv, input int band, output int c[$]);
    c = {};
    if (wv == 0 && band == 0) c = '{-16, 32, 96, 32, -16};
    if (wv == 0 && band == 1) c = '{-64, 128, -64};
    if (wv == 1 && band == 0) c = '{3, -2, -10, 34, 78, 34, -10, -2, 3};
    if (wv == 1 && band == 1) c = '{12, -7, -76, 142, -76, -7, 12};
  endfunction

  function automatic int reflect(int i, int len);
    if (i < 0) return -i;
    if (i > len - 1) return 2 * (len - 1) - i;
    return i;
  endfunction

  function automatic int rnd(longint acc);
    longint r;
    r = (acc + 64) >>> 7;
    return int'(r);
  endfunction

  function automatic bit clips(longint acc);
    int r;
    r = rnd(acc);
    return (r > 255) || (r < -256);
  endfunction

  function automatic int rsat(longint acc);
    int r;
    r = rnd(acc);
    if (r > 255) return 255;
    if (r < -256) return -256;
    return r;
  endfunction

  // One filter output with its raw sum.
  function automatic longint filt(int x[$], int wv, int band, int n);
    int c[$];
    int k;
    longint s;
    taps(wv, band, c);
    k = (c.size() - 1) / 2;
    s = 0;
    for (int j = 0; j < c.size(); j++)
      s += longint'(c[j]) * x[reflect(2 * n + band + j - k, x.size())];
    return s;
  endfunction

  // Full decomposition: result laid out as [A_J | D_J | ... | D_1]; nclip
  // returns how many outputs were clipped.
  function automatic void dwt(input int x[$], input int wv, input int levels,
                              output int res[$], output int nclip);
    int cur[$];
    int a[$];
    int d[$];
    int len;
    longint s;
    res = {};
    nclip = 0;
    cur = x;
    len = x.size();
    for (int i = 0; i < len; i++) res.push_back(0);
    for (int lv = 1; lv <= levels; lv++) begin
      a = {};
      d = {};
      for (int n = 0; n < cur.size() / 2; n++) begin
        s = filt(cur, wv, 0, n);
        if (clips(s)) nclip++;
        a.push_back(rsat(s));
        s = filt(cur, wv, 1, n);
        if (clips(s)) nclip++;
        d.push_back(rsat(s));
      end
      for (int n = 0; n < d.size(); n++) res[d.size() + n] = d[n];
      cur = a;
    end
    for (int n = 0; n < cur.size(); n++) res[n] = cur[n];
  endfunction

  // Number of clock cycles of a run, from the edge that samples start to the
  // edge at which done is seen high.
  function automatic int run_cycles(int len, int wv, int levels);
    int c[$];
    int per;
    int f;
    taps(wv, 0, c);
    per = c.size();
    taps(wv, 1, c);
    per += c.size();
    f = 0;
    for (int lv = 1; lv <= levels; lv++) f += (len >> lv) * per;
    return f + len + 4;
  endfunction

endpackage
