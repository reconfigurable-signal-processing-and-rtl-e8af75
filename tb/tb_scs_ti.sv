// tb_scs_ti: checks the K time-interleaved SCS cores and the output mux.
// K-lane words are applied at every f_Clk/k strobe (with some idle
// periods).  In Cartesian mode the output stream must be the input
// samples in their original order, one per master cycle, with the sample
// of lane j of a word taken at cycle t0 leaving after edge t0 + 36K + j.
// In polar mode the amplitude of each output must match sqrt(I^2+Q^2)
// within one Q0.7 step.  The cycles with a valid output are counted.
module tb_scs_ti;
  import dsp_pkg::*;
  import tb_ref_pkg::*;
  localparam int K = 4;
  localparam int NW = 100;
  logic clk = 0, rst_n = 0, ce_k = 0, in_valid = 0;
  logic [1:0] k_phase = '0;
  mod_t mode = MOD_CARTESIAN;
  iq_t lanes [K];
  logic out_valid;
  scs_out_t out;
  int checks = 0, failures = 0;

  scs_ti #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #400000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  task automatic run(input mod_t m);
    iq_t exp_q [$];
    int  exp_t [$];
    int  w, nout;
    mode = m; w = 0; nout = 0;
    @(negedge clk); rst_n = 0; @(negedge clk); rst_n = 1;
    for (int t = 0; t < NW * K * 2 + 40 * K; t++) begin
      ce_k = (t % K == 0);
      k_phase = 2'(t % K);
      if (ce_k) begin
        in_valid = (w < NW * 2) && (w % 5 != 4) && (w % 2 == 0 || w < 10);
        for (int j = 0; j < K; j++) begin
          real r, p;
          r = $urandom_range(0, 1000) / 1000.0;
          p = $urandom_range(0, 1000) / 1000.0 * 6.28;
          lanes[j] = '{i: 16'(int'(r * $cos(p) * 16384.0)), q: 16'(int'(r * $sin(p) * 16384.0))};
          if (in_valid) begin exp_q.push_back(lanes[j]); exp_t.push_back(t + 36 * K + j); end
        end
        w++;
      end
      @(posedge clk); #1;
      if (out_valid) begin
        iq_t e;
        int  et;
        nout++;
        if (exp_q.size() == 0) chk(0, "unexpected output");
        else begin
          e = exp_q.pop_front(); et = exp_t.pop_front();
          chk(t == et, $sformatf("output time %0d exp %0d", t, et));
          if (m == MOD_CARTESIAN)
            chk(out.a_i == e.i && out.q_ph2 == e.q, $sformatf("cartesian order: %0d exp %0d", out.a_i, e.i));
          else begin
            int ea;
            ea = amp7(amp_of(int'(e.i), int'(e.q)));
            chk(int'(out.a_i) - ea <= 1 && ea - int'(out.a_i) <= 1, $sformatf("polar A %0d exp %0d", out.a_i, ea));
          end
        end
      end
      @(negedge clk);
    end
    chk(exp_q.size() == 0, "all samples delivered");
    chk(nout > 0, "outputs produced");
  endtask

  initial begin
    for (int j = 0; j < K; j++) lanes[j] = '0;
    run(MOD_CARTESIAN);
    run(MOD_POLAR);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
