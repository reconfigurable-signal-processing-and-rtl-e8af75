// tb_deser: checks the interpolator output multiplexer and deserializer.
// For each half-band tap, a counting sample stream is applied at that
// tap's strobe (the other taps carry unrelated values); every valid word
// must hold the next K samples of the stream in order, words must be
// issued at ce_k, and their number must match the stream rate.  For the
// CIC tap, each ce_k must pass the K CIC lanes unchanged with valid high.
module tb_deser;
  import dsp_pkg::*;
  localparam int K = 4;
  localparam int N = 2;
  logic  clk = 0, rst_n = 0, ce_k = 0, s1 = 0, s2 = 0, s3 = 0;
  isel_t sel = SEL_HBF1;
  iq_t   h1 = '0, h2 = '0, h3 = '0;
  iq_t   cic_y [K];
  iq_t   lanes [K];
  logic  valid;
  int checks = 0, failures = 0;

  deser #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #400000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run(input isel_t s, input int cycles);
    int per, nxt_in, nxt_exp, words;
    iq_t prev_cic [K];
    per = (s == SEL_HBF1) ? 4*N : (s == SEL_HBF2) ? 2*N : N;
    @(negedge clk); rst_n = 0; sel = s;
    for (int j = 0; j < K; j++) begin cic_y[j] = '0; prev_cic[j] = '0; end
    @(negedge clk); rst_n = 1;
    nxt_in = 1; nxt_exp = 1; words = 0;
    for (int t = 0; t < cycles; t++) begin
      logic st;
      ce_k = (t % K == 0);
      s1 = (t % (4*N) == 0); s2 = (t % (2*N) == 0); s3 = (t % N == 0);
      st = (s == SEL_HBF1) ? s1 : (s == SEL_HBF2) ? s2 : (s == SEL_HBF3) ? s3 : 1'b0;
      h1 = '{i: 16'(1000 + t), q: 16'(-t)};
      h2 = h1; h3 = h1;
      if (st) begin
        if (s == SEL_HBF1) h1 = '{i: 16'(nxt_in), q: 16'(-nxt_in)};
        if (s == SEL_HBF2) h2 = '{i: 16'(nxt_in), q: 16'(-nxt_in)};
        if (s == SEL_HBF3) h3 = '{i: 16'(nxt_in), q: 16'(-nxt_in)};
        nxt_in++;
      end
      if (s == SEL_CIC && ce_k)
        for (int j = 0; j < K; j++) cic_y[j] = '{i: 16'($urandom), q: 16'($urandom)};
      for (int j = 0; j < K; j++) prev_cic[j] = cic_y[j];
      @(posedge clk); #1;
      if (s == SEL_CIC) begin
        if (ce_k) begin
          chk(valid, "CIC tap valid at every ce_k");
          for (int j = 0; j < K; j++) chk(lanes[j] == prev_cic[j], "CIC lanes passed through");
        end
      end else if (valid && ce_k) begin
        words++;
        for (int j = 0; j < K; j++) begin
          chk(lanes[j].i == 16'(nxt_exp) && lanes[j].q == 16'(-nxt_exp),
              $sformatf("tap %0d word %0d lane %0d = %0d exp %0d", s, words, j, lanes[j].i, nxt_exp));
          nxt_exp++;
        end
      end
      @(negedge clk);
    end
    if (s != SEL_CIC)
      chk(words >= cycles / (per * K) - 2 && words <= cycles / (per * K),
          $sformatf("tap %0d word count %0d for %0d cycles", s, words, cycles));
  endtask

  initial begin
    run(SEL_HBF1, 800);
    run(SEL_HBF2, 800);
    run(SEL_HBF3, 800);
    run(SEL_CIC, 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
