// tb_cic: checks the CIC interpolator with unrolled integrators.
// Random samples are applied at ce_n for ratios n = 2, 3 and 16 and
// several output shifts (shift 0 at n = 2 drives the output into
// saturation).  Every lane of every K-lane output word is compared with a
// reference computed on the master-clock time axis: zero stuffing by n
// and convolution with three cascaded length-n boxcars.  The timing is
// checked too: after the ce_k edge at cycle te, lane j holds the
// reference value of cycle te - 4K + 1 + j - 3n.
module tb_cic;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int K = 4;
  logic clk = 0, rst_n = 0, ce_n = 0, ce_k = 0;
  logic [3:0] shift = '0;
  iq_t x = '0;
  iq_t y [K];
  int checks = 0, failures = 0, sat_seen = 0;

  cic #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #2000000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int n, input int sh, input int amp, input int cycles);
    longint xui [], xuq [], h [];
    int     xi, xq;
    xui = new[cycles]; xuq = new[cycles]; h = new[3*n-2];
    for (int i = 0; i < 3*n-2; i++) h[i] = cic_h(n, i);
    @(negedge clk); rst_n = 0; x = '0; ce_n = 0; ce_k = 0; shift = 4'(sh);
    @(negedge clk); rst_n = 1;
    xi = 0; xq = 0;
    for (int t = 0; t < cycles; t++) begin
      ce_n = (t % n == 0);
      ce_k = (t % K == 0);
      if (ce_n) begin
        xi = (t < 8*n) ? 0 : int'($urandom_range(0, 2*amp)) - amp;
        xq = (t < 8*n) ? 0 : int'($urandom_range(0, 2*amp)) - amp;
        x.i = 16'(xi); x.q = 16'(xq);
      end
      xui[t] = ce_n ? xi : 0;
      xuq[t] = ce_n ? xq : 0;
      @(posedge clk); #1;
      if (ce_k && t >= 4*K + 3*n) begin
        for (int j = 0; j < K; j++) begin
          int     tau;
          longint ai, aq;
          int     ei, eq;
          tau = t - 4*K + 1 + j - 3*n;
          ai = 0; aq = 0;
          for (int i = 0; i < 3*n-2; i++)
            if (tau - i >= 0) begin ai += h[i] * xui[tau-i]; aq += h[i] * xuq[tau-i]; end
          ei = cic_scale(ai, sh); eq = cic_scale(aq, sh);
          if (ei == 32767 || ei == -32768) sat_seen++;
          checks++;
          if (int'(y[j].i) != ei || int'(y[j].q) != eq) begin
            failures++;
            if (failures < 10) $display("FAIL: n=%0d t=%0d lane %0d: %0d/%0d exp %0d/%0d",
                                        n, t, j, y[j].i, y[j].q, ei, eq);
          end
        end
      end
      @(negedge clk);
    end
  endtask

  initial begin
    run(2, 2, 16000, 600);
    run(3, 3, 12000, 600);
    run(16, 8, 16000, 1600);
    run(2, 0, 16000, 400);
    checks++;
    if (sat_seen == 0) begin failures++; $display("FAIL: saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
