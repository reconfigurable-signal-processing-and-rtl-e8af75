// tb_evm: signal-quality workload for the whole transmitter DSP at its
// default parameters, in the spirit of an EVM/ACLR measurement with a
// wide 64-QAM carrier.
//
// Stimulus: a periodic OFDM-like baseband, P = 256 input samples long,
// with 192 tones (bins -96..96 except 0, i.e. +-0.375 of the input rate,
// about a 190 MHz carrier at a 250 Msps input), each carrying a random
// 64-QAM symbol, scaled to an RMS of 0.2 and rounded to Q1.14.  Three
// periods are fed through the design for each interpolation factor (x4,
// x8, x16) and each modulation mode.  One steady-state output period
// (N = P * factor samples) is then transformed at the tone bins and at
// the adjacent-channel bins 104..296 on either side.
//
// The complex envelope is rebuilt from the output fields:
//   Cartesian  (I + jQ)
//   polar      A e^{j phi}
//   outphasing and multilevel  (amp_lvl/64) * (e^{j phi1} + e^{j phi2}) / 2
// The Cartesian run gives the interpolator's own response: a complex
// gain and a delay are fitted to it, which gives the reference symbols
// and the interpolator EVM.  For every mode the testbench then reports
// the in-band EVM against those reference symbols, the EVM of the SCS
// alone (against the exact Cartesian output), and ACLR on either side.
// Checks:
//  * EVM within the 8 % that NR allows for 64-QAM;
//  * ACLR of at least 30 dB;
//  * multilevel outphasing better than plain outphasing in EVM, the
//    point of the multilevel scheme;
//  * the Cartesian stream at x16 has at least one full period to analyse.
// The signal and the limits are this testbench's choices, not figures
// from the source (the limits are the NR 64-QAM EVM and UE ACLR values).
module tb_evm;
  import dsp_pkg::*;
  localparam int P    = 256;
  localparam int KMAX = 96;
  localparam int NPER = 3;
  localparam real PI  = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, bus_we = 0;
  logic [2:0] bus_addr = '0;
  logic [7:0] bus_wdata = '0, bus_rdata;
  iq_t bb_in = '0;
  logic bb_ready, out_valid;
  scs_out_t out;
  int checks = 0, failures = 0;

  real ar [-KMAX:KMAX], ai [-KMAX:KMAX];   // tone amplitudes
  int  xi [P], xq [P];                     // one period of baseband, Q1.14

  // reference symbols of the current factor: g * a_k * e^{-j 2 pi k tau / N}
  real refr [-KMAX:KMAX], refi [-KMAX:KMAX];
  real zr [-KMAX:KMAX], zi [-KMAX:KMAX];   // Cartesian output bins

  dsp_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #40000000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); bus_we = 1; bus_addr = 3'(a); bus_wdata = 8'(d);
    @(negedge clk); bus_we = 0;
  endtask

  // Feeds NPER periods in the given configuration and returns the
  // rebuilt complex envelope of every output sample.
  task automatic run(input int mode, input int tap, output real vr [$], output real vi [$]);
    int nin;
    vr = {}; vi = {};
    @(negedge clk); rst_n = 0; bb_in = '0;
    @(negedge clk); rst_n = 1;
    wr(0, 2); wr(1, tap); wr(2, 2); wr(3, mode); wr(4, 0);
    nin = 0;
    while (nin < NPER * P) begin
      if (bb_ready) begin
        bb_in = '{i: 16'(xi[nin % P]), q: 16'(xq[nin % P])};
        nin++;
      end
      @(posedge clk); #1;
      if (out_valid) begin
        real r, q, a, p1, p2;
        unique case (mode)
          0: begin r = real'(out.a_i) / 16384.0; q = real'(out.q_ph2) / 16384.0; end
          1: begin
            a = real'(out.a_i) / 128.0; p1 = real'(out.ph1) * 2.0 * PI / 128.0;
            r = a * $cos(p1); q = a * $sin(p1);
          end
          default: begin
            a  = real'(out.amp_lvl) / 64.0 / 2.0;
            p1 = real'(out.ph1) * 2.0 * PI / 128.0;
            p2 = real'(out.q_ph2[6:0]) * 2.0 * PI / 128.0;
            r = a * ($cos(p1) + $cos(p2)); q = a * ($sin(p1) + $sin(p2));
          end
        endcase
        vr.push_back(r); vi.push_back(q);
      end
      @(negedge clk);
    end
  endtask

  // DFT bin k (k / N cycles per sample) of N samples from m0.
  task automatic bin(input real vr [$], input real vi [$], input int m0, input int n,
                     input real ct [], input real st [], input int k,
                     output real br, output real bi);
    br = 0.0; bi = 0.0;
    for (int m = 0; m < n; m++) begin
      int ix;
      ix = ((k * m) % n + n) % n;
      br += vr[m0+m] * ct[ix] + vi[m0+m] * st[ix];
      bi += vi[m0+m] * ct[ix] - vr[m0+m] * st[ix];
    end
  endtask

  initial begin
    real evm_t [4][3], evm_s [4][3], aclr_l [4][3], aclr_u [4][3], evm_int [3];
    real pw, rms, peak;
    int  fac [3] = '{4, 8, 16};
    // symbols
    pw = 0.0;
    for (int k = -KMAX; k <= KMAX; k++) begin
      ar[k] = 0.0; ai[k] = 0.0;
      if (k != 0) begin
        ar[k] = real'(2 * int'($urandom_range(0, 7)) - 7);
        ai[k] = real'(2 * int'($urandom_range(0, 7)) - 7);
        pw += ar[k] * ar[k] + ai[k] * ai[k];
      end
    end
    for (int k = -KMAX; k <= KMAX; k++) begin
      ar[k] = ar[k] * 0.2 / $sqrt(pw); ai[k] = ai[k] * 0.2 / $sqrt(pw);
    end
    rms = 0.0; peak = 0.0;
    for (int n = 0; n < P; n++) begin
      real r, q;
      r = 0.0; q = 0.0;
      for (int k = -KMAX; k <= KMAX; k++) begin
        real c, s;
        c = $cos(2.0 * PI * k * n / P); s = $sin(2.0 * PI * k * n / P);
        r += ar[k] * c - ai[k] * s;
        q += ar[k] * s + ai[k] * c;
      end
      xi[n] = int'(r * 16384.0); xq[n] = int'(q * 16384.0);
      rms += r * r + q * q;
      if (r * r + q * q > peak) peak = r * r + q * q;
    end
    $display("baseband: RMS %f, peak %f (PAPR %.1f dB)", $sqrt(rms / P), $sqrt(peak),
             10.0 * $log10(peak / (rms / P)));
    repeat (2) @(negedge clk);

    for (int f = 0; f < 3; f++) begin
      int n, m0, best_s;
      real ct [], st [], ct2 [], st2 [];
      real best, gr, gi, den;
      real vr [$], vi [$];
      n = P * fac[f];
      ct = new[n]; st = new[n]; ct2 = new[2 * n]; st2 = new[2 * n];
      for (int m = 0; m < n; m++) begin ct[m] = $cos(2.0 * PI * m / n); st[m] = $sin(2.0 * PI * m / n); end
      for (int m = 0; m < 2 * n; m++) begin ct2[m] = $cos(PI * m / n); st2[m] = $sin(PI * m / n); end
      for (int mode = 0; mode < 4; mode++) begin
        real e_num, e_den, s_num, p_in, p_lo, p_hi;
        run(mode, (f == 2) ? 3 : f + 1, vr, vi);
        m0 = vr.size() - n - 8 * fac[f];
        if (mode == 0) chk(m0 >= n, $sformatf("x%0d: %0d outputs leave a full steady-state period", fac[f], vr.size()));
        if (m0 < 0) m0 = 0;
        e_num = 0.0; e_den = 0.0; s_num = 0.0; p_in = 0.0; p_lo = 0.0; p_hi = 0.0;
        for (int k = -KMAX; k <= KMAX; k++) begin
          real br, bi;
          if (k == 0) continue;
          bin(vr, vi, m0, n, ct, st, k, br, bi);
          br /= n; bi /= n;
          if (mode == 0) begin zr[k] = br; zi[k] = bi; end
          else begin
            e_num += (br - refr[k]) ** 2 + (bi - refi[k]) ** 2;
            s_num += (br - zr[k]) ** 2 + (bi - zi[k]) ** 2;
          end
          p_in += br * br + bi * bi;
        end
        for (int k = 104; k <= 296; k++) begin
          real br, bi;
          bin(vr, vi, m0, n, ct, st, k, br, bi);  p_hi += br * br + bi * bi;
          bin(vr, vi, m0, n, ct, st, -k, br, bi); p_lo += br * br + bi * bi;
        end
        p_hi /= real'(n) * n; p_lo /= real'(n) * n;
        if (mode == 0) begin
          // fit the interpolator's gain and delay (half-sample steps)
          best = -1.0; best_s = 0;
          for (int s = 0; s < 2 * n; s++) begin
            real sr, si;
            sr = 0.0; si = 0.0;
            for (int k = -KMAX; k <= KMAX; k++) begin
              int ix;
              real tr, ti;
              if (k == 0) continue;
              // z_k * conj(a_k) * e^{+j pi k s / n}
              tr = zr[k] * ar[k] + zi[k] * ai[k];
              ti = zi[k] * ar[k] - zr[k] * ai[k];
              ix = ((k * s) % (2 * n) + 2 * n) % (2 * n);
              sr += tr * ct2[ix] - ti * st2[ix];
              si += tr * st2[ix] + ti * ct2[ix];
            end
            if (sr * sr + si * si > best) begin best = sr * sr + si * si; best_s = s; gr = sr; gi = si; end
          end
          den = 0.0;
          for (int k = -KMAX; k <= KMAX; k++) den += ar[k] * ar[k] + ai[k] * ai[k];
          gr /= den; gi /= den;
          e_num = 0.0; e_den = 0.0;
          for (int k = -KMAX; k <= KMAX; k++) begin
            int ix;
            real pr, pi_;
            if (k == 0) begin refr[k] = 0.0; refi[k] = 0.0; continue; end
            ix = ((-k * best_s) % (2 * n) + 2 * n) % (2 * n);
            pr = gr * ct2[ix] - gi * st2[ix];
            pi_ = gr * st2[ix] + gi * ct2[ix];
            refr[k] = pr * ar[k] - pi_ * ai[k];
            refi[k] = pr * ai[k] + pi_ * ar[k];
            e_num += (zr[k] - refr[k]) ** 2 + (zi[k] - refi[k]) ** 2;
            e_den += refr[k] ** 2 + refi[k] ** 2;
          end
          evm_int[f] = 100.0 * $sqrt(e_num / e_den);
          evm_t[0][f] = evm_int[f]; evm_s[0][f] = 0.0;
          $display("x%0d: interpolator gain %.4f, delay %.1f output samples", fac[f],
                   $sqrt(gr * gr + gi * gi), best_s / 2.0);
        end else begin
          e_den = 0.0;
          for (int k = -KMAX; k <= KMAX; k++) e_den += refr[k] ** 2 + refi[k] ** 2;
          evm_t[mode][f] = 100.0 * $sqrt(e_num / e_den);
          evm_s[mode][f] = 100.0 * $sqrt(s_num / e_den);
        end
        aclr_l[mode][f] = 10.0 * $log10(p_in / p_lo);
        aclr_u[mode][f] = 10.0 * $log10(p_in / p_hi);
        $display("x%0d mode %0d: EVM %.2f %% (SCS alone %.2f %%), ACLR lower %.1f dB, upper %.1f dB",
                 fac[f], mode, evm_t[mode][f], evm_s[mode][f], aclr_l[mode][f], aclr_u[mode][f]);
        chk(evm_t[mode][f] < 8.0, $sformatf("x%0d mode %0d: EVM %.2f %% above 8 %%", fac[f], mode, evm_t[mode][f]));
        chk(aclr_l[mode][f] > 30.0 && aclr_u[mode][f] > 30.0,
            $sformatf("x%0d mode %0d: ACLR %.1f / %.1f dB below 30 dB", fac[f], mode, aclr_l[mode][f], aclr_u[mode][f]));
      end
      chk(evm_t[3][f] < evm_t[2][f], $sformatf("x%0d: multilevel EVM %.2f %% not below outphasing %.2f %%",
                                               fac[f], evm_t[3][f], evm_t[2][f]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
