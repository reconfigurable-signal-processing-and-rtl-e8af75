// tb_clk_div: checks the divided-clock strobes.
// For n = 2, 3 and 5 the strobes ce_n, ce_2n, ce_4n and ce_8n must fire
// with periods n, 2n, 4n and 8n, nested (ce_8n implies ce_4n ...);
// ce_k must fire every K cycles at the count set by clk_shift, with
// k_phase = 0 on it and counting up to K-1 between strobes.
module tb_clk_div;
  localparam int K = 4;
  logic clk = 0, rst_n = 0;
  logic [4:0] n_div = 5'd2;
  logic [1:0] clk_shift = '0;
  logic ce_n, ce_2n, ce_4n, ce_8n, ce_k;
  logic [1:0] k_phase;
  int checks = 0, failures = 0;

  clk_div #(.K(K)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #200000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic run(input int n, input int sh);
    int last [5];
    int cnt [5];
    int per [5];
    int t;
    @(negedge clk);
    rst_n = 0; n_div = 5'(n); clk_shift = 2'(sh);
    @(negedge clk); rst_n = 1;
    for (int s = 0; s < 5; s++) begin last[s] = -1; cnt[s] = 0; end
    per = '{n, 2*n, 4*n, 8*n, K};
    for (t = 0; t < 40 * 8 * n; t++) begin
      logic [4:0] v;
      v = {ce_k, ce_8n, ce_4n, ce_2n, ce_n};
      for (int s = 0; s < 5; s++) if (v[s]) begin
        if (last[s] >= 0) chk(t - last[s] == per[s], $sformatf("n=%0d strobe %0d period %0d", n, s, t - last[s]));
        last[s] = t; cnt[s]++;
      end
      if (ce_8n) chk(ce_4n, "ce_8n implies ce_4n");
      if (ce_4n) chk(ce_2n, "ce_4n implies ce_2n");
      if (ce_2n) chk(ce_n,  "ce_2n implies ce_n");
      chk(ce_k == (k_phase == 0), "k_phase 0 exactly at ce_k");
      if (t == 0) chk(ce_n && ce_8n, "strobes start aligned after reset");
      if (t < K) chk(ce_k == (t == sh), "ce_k phase follows clk_shift");
      @(negedge clk);
    end
    chk(cnt[3] == 40, $sformatf("n=%0d ce_8n count %0d", n, cnt[3]));
  endtask

  initial begin
    run(2, 0);
    run(3, 1);
    run(5, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
