// tb_cordic_vec: checks the vectoring CORDIC against real sqrt/atan2.
// Random vectors in all four quadrants (and the axes) with |I|,|Q| <= 1;
// the magnitude must be within 4 LSB of Q1.14 and the phase within 12
// binary-angle units (0.07 degree) of the exact values.  The latency must
// be ITER + 2 enabled edges, counting the one that takes the input; the pipeline is also run with en low in
// half of the cycles to check that it only advances when enabled.
module tb_cordic_vec;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int ITER = 15;
  localparam int NS = 400;
  logic clk = 0, rst_n = 0, en = 0, in_valid = 0, out_valid;
  sample_t i = '0, q = '0, mag;
  logic signed [16:0] phase;
  int checks = 0, failures = 0;
  int ii [NS], qq [NS];
  int sent, got, cyc, last_sent_cyc;
  int sent_at [NS];

  cordic_vec #(.ITER(ITER)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #200000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    for (int n = 0; n < NS; n++) begin
      ii[n] = int'($urandom_range(0, 32768)) - 16384;
      qq[n] = int'($urandom_range(0, 32768)) - 16384;
    end
    ii[0] = 16384; qq[0] = 0;  ii[1] = -16384; qq[1] = 0;
    ii[2] = 0; qq[2] = 16384;  ii[3] = 0; qq[3] = -16384;
    ii[4] = -16384; qq[4] = -1; ii[5] = -16384; qq[5] = 1;
    repeat (2) @(negedge clk); rst_n = 1;
    sent = 0; got = 0; cyc = 0;
    while (got < NS) begin
      en = (cyc < 2 * NS) ? 1'b1 : cyc[0];
      in_valid = en && (sent < NS);
      if (in_valid) begin i = 16'(ii[sent]); q = 16'(qq[sent]); end
      @(posedge clk); #1;
      if (en) begin
        cyc++;
        if (in_valid) begin sent_at[sent] = cyc; sent++; end
        if (out_valid) begin
          real a, p;
          int  pe, pd;
          a  = amp_of(ii[got], qq[got]) * 16384.0;
          p  = $atan2(real'(qq[got]), real'(ii[got]));
          pe = int'(p / PI * 32768.0);
          pd = int'(phase) - pe;
          if (pd > 32768) pd -= 65536;
          if (pd < -32768) pd += 65536;
          checks++;
          if ((real'(mag) - a > 4.0) || (a - real'(mag) > 4.0) || pd > 12 || pd < -12 ||
              (cyc - sent_at[got] + 1 != ITER + 2)) begin
            failures++;
            if (failures < 10) $display("FAIL: #%0d (%0d,%0d): mag %0d exp %f, phase %0d exp %0d, latency %0d",
                                        got, ii[got], qq[got], mag, a, phase, pe, cyc - sent_at[got] + 1);
          end
          got++;
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
