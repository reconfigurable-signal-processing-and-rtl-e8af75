// tb_ref_pkg: reference models for the testbenches.
//
// The models are written in the most direct form, independent of the
// structure of the RTL: the half-band and CIC interpolators as zero
// stuffing followed by a full-length convolution, the signal component
// separator with real-valued sqrt/atan2/acos.  Fixed-point rounding and
// saturation mimic the output formats the RTL documents.
package tb_ref_pkg;

  typedef int int_q[$];

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // Even-branch half-band coefficient m (first half), gain 2, Q1.14.
  function automatic int hb_c(int ntaps, int m);
    int c1 [8] = '{-48, 124, -269, 517, -928, 1647, -3196, 10334};
    int c2 [4] = '{-122, 674, -2370, 10006};
    int c3 [2] = '{-1186, 9363};
    if (ntaps == 31) return c1[m];
    if (ntaps == 15) return c2[m];
    return c3[m];
  endfunction

  // Full impulse response h[0..ntaps-1] of the half-band interpolator.
  function automatic int hb_h(int ntaps, int idx);
    int M;
    M = (ntaps + 1) / 4;
    if (idx == 2*M - 1) return 16384;             // centre tap, gain 2 * 0.5
    if (idx % 2 != 0) return 0;
    if (idx / 2 < M) return hb_c(ntaps, idx / 2);
    return hb_c(ntaps, 2*M - 1 - idx / 2);
  endfunction

  // Zero-stuff by 2 and filter; rounds to Q1.14 and saturates.
  function automatic int_q hbf_ref(int_q x, int ntaps);
    int_q y;
    for (int m = 0; m < 2 * x.size(); m++) begin
      longint acc = 0;
      for (int i = 0; i < ntaps; i++) begin
        int k = m - i;
        if (k >= 0 && k % 2 == 0) acc += longint'(hb_h(ntaps, i)) * x[k/2];
      end
      y.push_back(sat16((acc + 8192) >>> 14));
    end
    return y;
  endfunction

  // CIC of order 3: impulse response = three cascaded boxcars of length L.
  function automatic longint cic_h(int L, int idx);
    longint s = 0;
    for (int a = 0; a < L; a++)
      for (int b = 0; b < L; b++) begin
        int c = idx - a - b;
        if (c >= 0 && c < L) s++;
      end
    return s;
  endfunction

  function automatic int cic_scale(longint v, int sh);
    if (sh > 0) v += (longint'(1) <<< (sh - 1));
    return sat16(v >>> sh);
  endfunction

  function automatic int_q cic_ref(int_q x, int L, int sh);
    int_q   y;
    longint h [];
    h = new[3*L - 2];
    for (int i = 0; i < 3*L - 2; i++) h[i] = cic_h(L, i);
    for (int m = 0; m < L * x.size(); m++) begin
      longint acc = 0;
      for (int i = 0; i < 3*L - 2; i++) begin
        int k = m - i;
        if (k >= 0 && k % L == 0) acc += h[i] * x[k/L];
      end
      y.push_back(cic_scale(acc, sh));
    end
    return y;
  endfunction

  // --- signal component separator ---------------------------------------
  localparam real PI = 3.14159265358979323846;

  function automatic real amp_of(int i, int q);
    return $sqrt(real'(i) * i + real'(q) * q) / 16384.0;
  endfunction

  // Phase in [0, 2pi) quantised to res bits (rounded, modulo 2^res).
  function automatic int phase_q(real p, int res);
    real w = p;
    int  s = 1 << res;
    while (w < 0.0) w += 2.0 * PI;
    while (w >= 2.0 * PI) w -= 2.0 * PI;
    return int'($floor(w / (2.0 * PI) * s + 0.5)) % s;
  endfunction

  function automatic int amp7(real a);
    int r = int'($floor(a * 128.0 + 0.5));
    return (r > 127) ? 127 : r;
  endfunction

  // Circular distance between two res-bit phase codes.
  function automatic int phase_dist(int a, int b, int res);
    int d = (a - b) % (1 << res);
    if (d < 0) d += (1 << res);
    if (d > (1 << (res - 1))) d = (1 << res) - d;
    return d;
  endfunction

  // Expected-value check of one SCS output for input (ii, qq) in mode
  // (0 Cartesian .. 3 multilevel).  Phases may be one 7-bit step off,
  // A one Q0.7 step; near a level boundary either level is accepted.
  // lvl returns the level that matched (multilevel), 0 otherwise.
  // Phases are not checked for vectors shorter than 2^-9.
  function automatic bit scs_check(int ii, int qq, int mode, int amp_lvl, int a_i,
                                   int ph1, int q_ph2, int amax, output int lvl);
    real a, phi, x4, th;
    int  ea, lo, hi, lv;
    bit  ok;
    lvl = 0;
    a = amp_of(ii, qq);
    if (a > 1.0) a = 1.0;
    ea = amp7(a);
    if (mode == 0) return a_i == ii && q_ph2 == qq && amp_lvl == 0 && ph1 == 0;
    if (a_i - ea > 1 || ea - a_i > 1) return 0;
    // The phase of a vector of a few LSB is undefined in fixed point:
    // below A = 2^-9 (a quarter of a 7-bit amplitude step) only the
    // amplitudes are checked.
    if (a < 1.0 / 512.0) return 1;
    phi = $atan2(real'(qq), real'(ii));
    if (mode == 1) return amp_lvl == 0 && phase_dist(ph1, phase_q(phi, 7), 7) <= 1;
    if (mode == 2) begin
      th = $acos(a);
      return amp_lvl == 64 && phase_dist(ph1, phase_q(phi + th, 7), 7) <= 1 &&
             phase_dist(q_ph2, phase_q(phi - th, 7), 7) <= 1;
    end
    x4 = a * amax;
    lo = int'($ceil(x4 - 0.002)); hi = int'($ceil(x4 + 0.002));
    ok = 0;
    for (int l = lo; l <= hi; l++) begin
      lv = (l < 1) ? 1 : (l > amax) ? amax : l;
      th = $acos((x4 / lv > 1.0) ? 1.0 : x4 / lv);
      if (amp_lvl == lv * 64 / amax && phase_dist(ph1, phase_q(phi + th, 7), 7) <= 1 &&
          phase_dist(q_ph2, phase_q(phi - th, 7), 7) <= 1) begin
        ok = 1; lvl = lv;
      end
    end
    return ok;
  endfunction

endpackage
