// tb_hbf: checks the three half-band interpolators (31, 15 and 7 taps).
// Random Q1.14 samples (including full-scale ones) are applied every
// second cycle; the output, one sample per cycle, must equal the
// zero-stuffed direct-form convolution of the reference model exactly,
// with the documented timing: the output after edge c is reference
// sample c-1 (the input is taken at even edges).
module tb_hbf;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int NS = 200;
  logic clk = 0, rst_n = 0, ce_in = 0, ce_out = 0;
  iq_t  x;
  iq_t  y1, y2, y3;
  int checks = 0, failures = 0;

  hbf #(.NTAPS(31)) d1 (.clk, .rst_n, .ce_in, .ce_out, .x, .y(y1));
  hbf #(.NTAPS(15)) d2 (.clk, .rst_n, .ce_in, .ce_out, .x, .y(y2));
  hbf #(.NTAPS(7))  d3 (.clk, .rst_n, .ce_in, .ce_out, .x, .y(y3));
  always #5 clk = ~clk;

  initial begin
    #100000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  int_q xi, xq, r1i, r1q, r2i, r2q, r3i, r3q;

  initial begin
    for (int n = 0; n < NS; n++) begin
      int a, b;
      if (n % 50 == 7) begin a = 32767; b = -32768; end
      else if (n % 50 == 8) begin a = 32767; b = 32767; end
      else begin a = int'($urandom_range(0, 32767)) - 16384; b = int'($urandom_range(0, 32767)) - 16384; end
      xi.push_back(a); xq.push_back(b);
    end
    r1i = hbf_ref(xi, 31); r1q = hbf_ref(xq, 31);
    r2i = hbf_ref(xi, 15); r2q = hbf_ref(xq, 15);
    r3i = hbf_ref(xi, 7);  r3q = hbf_ref(xq, 7);
    x = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int c = 0; c < 2 * NS; c++) begin
      // drive for edge c
      ce_out = 1;
      ce_in  = (c % 2 == 0);
      if (c % 2 == 0) begin x.i = 16'(xi[c/2]); x.q = 16'(xq[c/2]); end
      @(posedge clk); #1;
      if (c >= 1) begin
        checks++;
        if (y1.i != 16'(r1i[c-1]) || y1.q != 16'(r1q[c-1]) ||
            y2.i != 16'(r2i[c-1]) || y2.q != 16'(r2q[c-1]) ||
            y3.i != 16'(r3i[c-1]) || y3.q != 16'(r3q[c-1])) begin
          failures++;
          if (failures < 10)
            $display("FAIL: out %0d: hbf1 %0d/%0d exp %0d/%0d, hbf2 %0d exp %0d, hbf3 %0d exp %0d",
                     c-1, y1.i, y1.q, r1i[c-1], r1q[c-1], y2.i, r2i[c-1], y3.i, r3i[c-1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
