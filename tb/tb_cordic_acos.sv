// tb_cordic_acos: checks the double-iteration arccosine CORDIC.
// Random t over [-1, 1] plus the end points and zero; theta must be within
// 12 binary-angle units (0.07 degree, a fortieth of a 7-bit phase step)
// of acos(t).  Inputs outside [-1, 1] must give the clamped result, and
// the latency must be ITER + 1 edges, counting the one that takes the input.
module tb_cordic_acos;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int ITER = 15;
  localparam int NS = 500;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0, out_valid;
  sample_t t = '0;
  logic signed [16:0] theta;
  int checks = 0, failures = 0, maxerr = 0;
  int tt [NS];
  int sent, got, cyc;
  int sent_at [NS];

  cordic_acos #(.ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < NS; n++) tt[n] = int'($urandom_range(0, 32768)) - 16384;
    tt[0] = 16384; tt[1] = -16384; tt[2] = 0; tt[3] = 20000; tt[4] = -30000; tt[5] = 16383;
    repeat (2) @(negedge clk); rst_n = 1;
    sent = 0; got = 0; cyc = 0;
    while (got < NS) begin
      in_valid = (sent < NS);
      if (in_valid) t = 16'(tt[sent]);
      @(posedge clk); #1;
      cyc++;
      if (in_valid) begin sent_at[sent] = cyc; sent++; end
      if (out_valid) begin
        real tv;
        int  e, d;
        tv = real'(tt[got]) / 16384.0;
        if (tv > 1.0) tv = 1.0;
        if (tv < -1.0) tv = -1.0;
        e = int'($acos(tv) / PI * 32768.0);
        d = int'(theta) - e;
        if (d < 0) d = -d;
        if (d > maxerr) maxerr = d;
        checks++;
        if (d > 12 || cyc - sent_at[got] + 1 != ITER + 1) begin
          failures++;
          if (failures < 10) $display("FAIL: t=%0d theta %0d exp %0d latency %0d", tt[got], theta, e, cyc - sent_at[got] + 1);
        end
        got++;
      end
      @(negedge clk);
    end
    $display("max error %0d units", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
