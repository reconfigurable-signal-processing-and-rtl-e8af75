// tb_scs_core: checks the signal component separator core.
// Three generated variants run side by side on the same random I/Q
// samples: SCS_TYPE = 3 (full core), 2 (outphasing core: a multilevel
// request falls back to plain outphasing), 1 (polar) and 0 (Cartesian).  Each
// run-time mode is applied to a block of samples, some with |A| > 1 to
// exercise the clamp.  Expected values come from real sqrt/atan2/acos:
// phases may differ from the rounded 7-bit value by one step, A by one
// Q0.7 step; the level A_mo must be exact unless A*AMAX lies within
// 0.002 of an integer, where either neighbouring level (with its own
// theta) is accepted.  The latency of each variant (36, 36, 18 and 1 edges,
// counting the one that takes the input) is checked on every sample.
// The zero vector, whose phase is undefined, is checked for amplitude only.
module tb_scs_core;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int NS = 300;
  localparam int AMAX = 4;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  mod_t mode = MOD_CARTESIAN;
  iq_t  in = '0;
  logic v3, v2, v1, v0;
  scs_out_t o3, o2, o1, o0;
  int checks = 0, failures = 0;
  int ii [NS], qq [NS];
  int sent_at [NS];
  int lvl_seen [AMAX+1];

  scs_core #(.SCS_TYPE(3), .AMAX(AMAX)) d3 (.clk, .rst_n, .en, .mode, .in_valid, .in, .out_valid(v3), .out(o3));
  scs_core #(.SCS_TYPE(2), .AMAX(AMAX)) d2 (.clk, .rst_n, .en, .mode, .in_valid, .in, .out_valid(v2), .out(o2));
  scs_core #(.SCS_TYPE(1), .AMAX(AMAX)) d1 (.clk, .rst_n, .en, .mode, .in_valid, .in, .out_valid(v1), .out(o1));
  scs_core #(.SCS_TYPE(0), .AMAX(AMAX)) d0 (.clk, .rst_n, .en, .mode, .in_valid, .in, .out_valid(v0), .out(o0));
  always #5 clk = ~clk;

  initial begin
    #400000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 15) $display("FAIL: %s", what); end
  endtask

  // Checks the full core's output for sample n in mode m.
  task automatic check_full(input int n, input mod_t m, input scs_out_t o);
    real a, phi, x4;
    int  ea;
    a   = amp_of(ii[n], qq[n]);
    if (a > 1.0) a = 1.0;
    phi = $atan2(real'(qq[n]), real'(ii[n]));
    ea  = amp7(a);
    if (ii[n] == 0 && qq[n] == 0 && m != MOD_CARTESIAN) begin
      // The phase of the zero vector is undefined: check the amplitudes only.
      chk(o.a_i == 0 && o.amp_lvl == ((m == MOD_POLAR) ? 7'd0 : (m == MOD_OUTPHASE) ? 7'd64 : 7'(64 / AMAX)),
          $sformatf("zero vector, mode %0d", m));
      return;
    end
    case (m)
      MOD_CARTESIAN: chk(o.a_i == 16'(ii[n]) && o.q_ph2 == 16'(qq[n]) && o.amp_lvl == 0 && o.ph1 == 0,
                         $sformatf("cart #%0d", n));
      MOD_POLAR: chk(phase_dist(int'(o.ph1), phase_q(phi, 7), 7) <= 1 &&
                     int'(o.a_i) - ea <= 1 && ea - int'(o.a_i) <= 1 && o.amp_lvl == 0,
                     $sformatf("polar #%0d A %0d exp %0d phi %0d exp %0d", n, o.a_i, ea, o.ph1, phase_q(phi, 7)));
      MOD_OUTPHASE: begin
        real th;
        th = $acos(a);
        chk(o.amp_lvl == 7'd64 &&
            phase_dist(int'(o.ph1), phase_q(phi + th, 7), 7) <= 1 &&
            phase_dist(int'(o.q_ph2), phase_q(phi - th, 7), 7) <= 1,
            $sformatf("outphasing #%0d ph1 %0d exp %0d ph2 %0d exp %0d", n, o.ph1,
                      phase_q(phi + th, 7), o.q_ph2, phase_q(phi - th, 7)));
      end
      default: begin
        bit ok;
        int lo, hi;
        x4 = a * AMAX;
        lo = int'($ceil(x4 - 0.002)); hi = int'($ceil(x4 + 0.002));
        ok = 0;
        for (int l = lo; l <= hi; l++) begin
          int  lv;
          real th;
          lv = (l < 1) ? 1 : (l > AMAX) ? AMAX : l;
          th = $acos((x4 / lv > 1.0) ? 1.0 : x4 / lv);
          if (int'(o.amp_lvl) == lv * 64 / AMAX &&
              phase_dist(int'(o.ph1), phase_q(phi + th, 7), 7) <= 1 &&
              phase_dist(int'(o.q_ph2), phase_q(phi - th, 7), 7) <= 1) begin
            ok = 1; lvl_seen[lv]++;
          end
        end
        chk(ok, $sformatf("multilevel #%0d A*4=%f lvl %0d ph1 %0d ph2 %0d", n, x4, o.amp_lvl, o.ph1, o.q_ph2));
      end
    endcase
  endtask

  task automatic run_mode(input mod_t m);
    int sent, g3, g2, g1, g0, cyc;
    mode = m;
    sent = 0; g3 = 0; g2 = 0; g1 = 0; g0 = 0; cyc = 0;
    while (g3 < NS) begin
      in_valid = (sent < NS) && (cyc % 7 != 3);   // a few idle slots
      if (in_valid) in = '{i: 16'(ii[sent]), q: 16'(qq[sent])};
      @(posedge clk); #1;
      cyc++;
      if (in_valid) begin sent_at[sent] = cyc; sent++; end
      if (v0) begin
        chk(o0.a_i == 16'(ii[g0]) && o0.q_ph2 == 16'(qq[g0]) && cyc - sent_at[g0] + 1 == 1,
            $sformatf("type 0 #%0d", g0));
        g0++;
      end
      if (v1) begin
        mod_t m1;
        m1 = (m == MOD_CARTESIAN) ? MOD_CARTESIAN : MOD_POLAR;
        chk(cyc - sent_at[g1] + 1 == 18, "type 1 latency");
        check_full(g1, m1, o1);
        g1++;
      end
      if (v2) begin
        chk(cyc - sent_at[g2] + 1 == 36, "type 2 latency");
        check_full(g2, (m == MOD_MULTILVL) ? MOD_OUTPHASE : m, o2);
        g2++;
      end
      if (v3) begin
        chk(cyc - sent_at[g3] + 1 == 36, $sformatf("type 3 latency %0d", cyc - sent_at[g3] + 1));
        check_full(g3, m, o3);
        g3++;
      end
      @(negedge clk);
    end
  endtask

  initial begin
    for (int n = 0; n < NS; n++) begin
      real r, p;
      r = (n % 10 == 9) ? 1.0 + $urandom_range(0, 100) / 1000.0 : $urandom_range(0, 1000) / 1000.0;
      p = $urandom_range(0, 10000) / 10000.0 * 2.0 * PI;
      ii[n] = int'(r * $cos(p) * 16384.0);
      qq[n] = int'(r * $sin(p) * 16384.0);
    end
    ii[0] = 0; qq[0] = 0;
    for (int l = 0; l <= AMAX; l++) lvl_seen[l] = 0;
    repeat (2) @(negedge clk); rst_n = 1;
    run_mode(MOD_CARTESIAN);
    run_mode(MOD_POLAR);
    run_mode(MOD_OUTPHASE);
    run_mode(MOD_MULTILVL);
    for (int l = 1; l <= AMAX; l++) chk(lvl_seen[l] > 0, $sformatf("level %0d never produced", l));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
