// tb_dsp_top: end-to-end test of the transmitter DSP at its default
// parameters (K = 4, 7-bit outputs, multilevel-capable core, AMAX = 4).
//
// Each run resets the design, optionally writes the control bus, feeds
// random baseband I/Q at every bb_ready and collects the output stream.
// The reference is the chain of half-band and CIC models followed by the
// real-valued SCS model.  Cartesian runs must match the interpolated I/Q
// exactly after a whole-sample delay, which is found and then reused for
// the polar, outphasing and multilevel runs of the same interpolation
// setting (the SCS latency does not depend on the mode).  The runs cover:
// the reset configuration (multilevel outphasing, x16) without any bus
// write, every modulation mode, every interpolator tap (bypass x2, x4,
// x8 and CIC), the CIC ratio n = 3 (x24), a shifted f_Clk/k phase, the
// full output rate (one sample per master cycle with the CIC tap) and
// every time-interleaved slot and amplitude level.  Each of these
// mechanisms is counted; one that never happens is a failure.
module tb_dsp_top;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int K = 4;
  localparam int AMAX = 4;
  logic clk = 0, rst_n = 0, bus_we = 0;
  logic [2:0] bus_addr = '0;
  logic [7:0] bus_wdata = '0, bus_rdata;
  iq_t bb_in = '0;
  logic bb_ready, out_valid;
  scs_out_t out;
  int checks = 0, failures = 0;

  // mechanism counters
  int m_bus = 0, m_reset_cfg = 0, m_n3 = 0, m_shift = 0, m_fullrate = 0;
  int m_mode [4] = '{0, 0, 0, 0};
  int m_tap  [4] = '{0, 0, 0, 0};
  int m_slot [K];
  int m_lvl  [AMAX+1];

  dsp_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    #20000000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic wr(input int a, input int d);
    @(negedge clk); bus_we = 1; bus_addr = 3'(a); bus_wdata = 8'(d);
    @(negedge clk); bus_we = 0;
    m_bus++;
  endtask

  task automatic rd(input int a, output int d);
    @(negedge clk); bus_addr = 3'(a); #1; d = int'(bus_rdata);
  endtask

  task automatic chk_cfg(input int n, input int tap, input int sh, input int mode, input int ks);
    int v0, v1, v2, v3, v4;
    rd(0, v0); rd(1, v1); rd(2, v2); rd(3, v3); rd(4, v4);
    chk(v0 == n && v1 == tap && v2 == sh && v3 == mode && v4 == ks,
        $sformatf("configuration read back %0d %0d %0d %0d %0d", v0, v1, v2, v3, v4));
  endtask

  // One run; returns the delay found (Cartesian) or uses the one given.
  task automatic run(input int mode, input int tap, input int n, input int sh,
                     input int kshift, input bit use_bus, input int nin,
                     input int d_in, output int d_out);
    int_q xi, xq, ri, rq;
    scs_out_t o [$];
    int factor, run_len, max_run, ncmp;
    @(negedge clk); rst_n = 0; bb_in = '0;
    @(negedge clk); rst_n = 1;
    // Five bus writes in every run, so every run starts its stream at the
    // same cycle after reset; the reset-configuration run writes only to
    // an unmapped address.  The datapath carries zeros meanwhile.
    if (use_bus) begin
      wr(0, n); wr(1, tap); wr(2, sh); wr(3, mode); wr(4, kshift);
      chk_cfg(n, tap, sh, mode, kshift);
    end else begin
      for (int w = 0; w < 5; w++) wr(7, 8'hff);
      m_bus -= 5;
      chk_cfg(2, 3, 2, 3, 0);   // reset values: multilevel outphasing, x16
      m_reset_cfg++;
    end
    run_len = 0; max_run = 0;
    while (xi.size() < nin) begin
      if (bb_ready) begin
        int a, b;
        a = (xi.size() < 4) ? 0 : int'($urandom_range(0, 22000)) - 11000;
        b = (xi.size() < 4) ? 0 : int'($urandom_range(0, 22000)) - 11000;
        bb_in = '{i: 16'(a), q: 16'(b)};
        xi.push_back(a); xq.push_back(b);
      end
      @(posedge clk); #1;
      if (out_valid) begin
        o.push_back(out);
        m_slot[o.size() % K]++;   // slot of the interleaved core in the stream
        run_len++;
        if (run_len > max_run) max_run = run_len;
      end else run_len = 0;
      @(negedge clk);
    end
    // reference chain
    ri = hbf_ref(xi, 31); rq = hbf_ref(xq, 31); factor = 2;
    if (tap >= 1) begin ri = hbf_ref(ri, 15); rq = hbf_ref(rq, 15); factor = 4; end
    if (tap >= 2) begin ri = hbf_ref(ri, 7);  rq = hbf_ref(rq, 7);  factor = 8; end
    if (tap == 3) begin ri = cic_ref(ri, n, sh); rq = cic_ref(rq, n, sh); factor = 8 * n; end
    d_out = d_in;
    if (mode == 0) begin
      d_out = -1;
      for (int d = 0; d < 60 * factor && d_out < 0; d++) begin
        bit ok = 1;
        for (int m = 0; m < o.size() && ok; m++) begin
          int ei, eq;
          ei = (m < d) ? 0 : ri[m-d];
          eq = (m < d) ? 0 : rq[m-d];
          if (int'(o[m].a_i) != ei || int'(o[m].q_ph2) != eq) ok = 0;
        end
        if (ok) d_out = d;
      end
      chk(d_out >= 0, $sformatf("Cartesian tap %0d n=%0d shift %0d: stream matches reference", tap, n, kshift));
      if (d_out >= 0) begin m_mode[0]++; m_tap[tap]++; end
      ncmp = o.size();
    end else begin
      int bad;
      bad = 0; ncmp = 0;
      for (int m = d_in; m < o.size(); m++) begin
        int lv;
        ncmp++;
        if (!scs_check(ri[m-d_in], rq[m-d_in], mode, int'(o[m].amp_lvl), int'(o[m].a_i),
                       int'(o[m].ph1), int'(o[m].q_ph2), AMAX, lv)) begin
          bad++;
          if (bad < 5) $display("mismatch mode %0d sample %0d: I/Q %0d/%0d out %0d %0d %0d %0d", mode, m,
                                ri[m-d_in], rq[m-d_in], o[m].amp_lvl, o[m].a_i, o[m].ph1, o[m].q_ph2);
        end
        else if (mode == 3) m_lvl[lv]++;
      end
      chk(bad == 0 && ncmp > 100, $sformatf("mode %0d tap %0d: %0d of %0d samples wrong", mode, tap, bad, ncmp));
      if (bad == 0) m_mode[mode]++;
    end
    chk(o.size() <= factor * nin && o.size() + d_out + 2 * K >= factor * nin - 12 * factor,
        $sformatf("mode %0d tap %0d n=%0d: %0d outputs for %0d inputs", mode, tap, n, o.size(), nin));
    if (tap == 3 && n == 2) begin
      chk(max_run >= factor * nin / 2, $sformatf("full-rate stream, longest run %0d", max_run));
      if (max_run >= factor * nin / 2) m_fullrate++;
    end
    if (n == 3) m_n3++;
    if (kshift != 0) m_shift++;
    $display("run mode %0d tap %0d n %0d shift %0d: %0d outputs, delay %0d, %0d compared",
             mode, tap, n, kshift, o.size(), d_out, ncmp);
  endtask

  initial begin
    int d16, d, dummy;
    for (int j = 0; j < K; j++) m_slot[j] = 0;
    for (int l = 0; l <= AMAX; l++) m_lvl[l] = 0;
    repeat (2) @(negedge clk);
    // Cartesian x16 to find the delay of the default interpolation setting
    run(0, 3, 2, 2, 0, 1, 200, 0, d16);
    // reset configuration: multilevel outphasing, x16, no bus writes
    run(3, 3, 2, 2, 0, 0, 200, d16, dummy);
    run(1, 3, 2, 2, 0, 1, 200, d16, dummy);
    run(2, 3, 2, 2, 0, 1, 200, d16, dummy);
    // bypass taps
    run(0, 0, 2, 2, 0, 1, 120, 0, d);
    run(1, 0, 2, 2, 0, 1, 120, d, dummy);
    run(0, 1, 2, 2, 0, 1, 120, 0, d);
    run(0, 2, 2, 2, 0, 1, 120, 0, d);
    run(2, 2, 2, 2, 0, 1, 120, d, dummy);
    // CIC ratio 3 (x24) and a shifted f_Clk/k phase
    run(0, 3, 3, 3, 0, 1, 100, 0, d);
    run(3, 3, 3, 3, 0, 1, 100, d, dummy);
    run(0, 3, 2, 2, 2, 1, 120, 0, d);
    // mechanisms
    chk(m_bus > 0, "control bus never written");
    chk(m_reset_cfg > 0, "reset configuration never run");
    for (int i = 0; i < 4; i++) chk(m_mode[i] > 0, $sformatf("mode %0d never verified", i));
    for (int i = 0; i < 4; i++) chk(m_tap[i] > 0, $sformatf("tap %0d never verified", i));
    for (int j = 0; j < K; j++) chk(m_slot[j] > 0, $sformatf("interleaved slot %0d never used", j));
    for (int l = 1; l <= AMAX; l++) chk(m_lvl[l] > 0, $sformatf("amplitude level %0d never produced", l));
    chk(m_n3 > 0, "CIC ratio 3 never run");
    chk(m_shift > 0, "clock shift never run");
    chk(m_fullrate > 0, "full output rate never reached");
    $display("mechanisms: bus writes %0d, modes %0d/%0d/%0d/%0d, taps %0d/%0d/%0d/%0d, slots %0d/%0d/%0d/%0d, levels %0d/%0d/%0d/%0d, n=3 %0d, clk shift %0d, full rate %0d",
             m_bus, m_mode[0], m_mode[1], m_mode[2], m_mode[3], m_tap[0], m_tap[1], m_tap[2], m_tap[3],
             m_slot[0], m_slot[1], m_slot[2], m_slot[3], m_lvl[1], m_lvl[2], m_lvl[3], m_lvl[4], m_n3, m_shift, m_fullrate);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
