// tb_interpolator: checks the whole interpolation chain.
// The divider strobes come from clk_div.  Random baseband samples are
// applied at every ce_8n; the K-lane output words are joined into one
// stream and compared sample by sample with the reference chain
// (half-band models, then the CIC model with ratio n and the same shift)
// for the taps HBF1 (x2), HBF2 (x4), HBF3 (x8) and CIC with n = 2 (x16)
// and n = 3 (x24).  The stream must equal the reference delayed by a
// whole number of samples (the pipeline fill, all zero); that delay must
// exist, and the number of output samples must be the interpolation
// factor times the number of inputs, less at most the delay.
module tb_interpolator;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int K = 4;
  logic clk = 0, rst_n = 0;
  logic [4:0] n_div = 5'd2;
  logic ce_n, ce_2n, ce_4n, ce_8n, ce_k;
  logic [1:0] k_phase;
  isel_t sel = SEL_CIC;
  logic [3:0] cic_shift = 4'd2;
  iq_t bb = '0;
  iq_t lanes [K];
  logic valid;
  int checks = 0, failures = 0;

  clk_div #(.K(K)) u_div (.clk, .rst_n, .n_div, .clk_shift(2'd0), .ce_n, .ce_2n, .ce_4n, .ce_8n, .ce_k, .k_phase);
  interpolator #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #4000000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input isel_t s, input int n, input int sh, input int nin);
    int_q xi, xq, ri, rq, di, dq;
    int   factor, d, found;
    @(negedge clk); rst_n = 0; sel = s; n_div = 5'(n); cic_shift = 4'(sh); bb = '0;
    @(negedge clk); rst_n = 1;
    while (xi.size() < nin) begin
      if (ce_8n) begin
        int a, b;
        a = (xi.size() < 4) ? 0 : int'($urandom_range(0, 20000)) - 10000;
        b = (xi.size() < 4) ? 0 : int'($urandom_range(0, 20000)) - 10000;
        bb = '{i: 16'(a), q: 16'(b)};
        xi.push_back(a); xq.push_back(b);
      end
      @(posedge clk); #1;
      if (ce_k && valid)
        for (int j = 0; j < K; j++) begin di.push_back(int'(lanes[j].i)); dq.push_back(int'(lanes[j].q)); end
      @(negedge clk);
    end
    ri = hbf_ref(xi, 31); rq = hbf_ref(xq, 31);
    factor = 2;
    if (s != SEL_HBF1) begin ri = hbf_ref(ri, 15); rq = hbf_ref(rq, 15); factor = 4; end
    if (s == SEL_HBF3 || s == SEL_CIC) begin ri = hbf_ref(ri, 7); rq = hbf_ref(rq, 7); factor = 8; end
    if (s == SEL_CIC) begin ri = cic_ref(ri, n, sh); rq = cic_ref(rq, n, sh); factor = 8 * n; end
    found = -1;
    for (d = 0; d < 40 * factor && found < 0; d++) begin
      bit ok = 1;
      for (int m = 0; m < di.size() && ok; m++) begin
        int ei, eq;
        ei = (m < d) ? 0 : ri[m-d];
        eq = (m < d) ? 0 : rq[m-d];
        if (di[m] != ei || dq[m] != eq) ok = 0;
      end
      if (ok) found = d;
    end
    chk(found >= 0, $sformatf("tap %0d n=%0d: output matches the reference chain", s, n));
    chk(di.size() <= factor * nin && di.size() + found + K >= factor * nin - 8 * factor,
        $sformatf("tap %0d n=%0d: %0d outputs for %0d inputs (factor %0d, delay %0d)", s, n, di.size(), nin, factor, found));
    $display("tap %0d n=%0d factor %0d: %0d samples compared, delay %0d", s, n, factor, di.size(), found);
  endtask

  initial begin
    run(SEL_HBF1, 2, 2, 120);
    run(SEL_HBF2, 2, 2, 120);
    run(SEL_HBF3, 2, 2, 120);
    run(SEL_CIC,  2, 2, 120);
    run(SEL_CIC,  3, 3, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
