// tb_ctrl_bus: checks the control-bus register file.
// Reset values, write/read-back of every register, the n >= 2 limit,
// that an unmapped address changes nothing and reads zero.
module tb_ctrl_bus;
  import dsp_pkg::*;
  logic clk = 0, rst_n = 0, bus_we = 0;
  logic [2:0] bus_addr = '0;
  logic [7:0] bus_wdata = '0, bus_rdata;
  cfg_t cfg;
  int checks = 0, failures = 0;

  ctrl_bus dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [2:0] a, input logic [7:0] d);
    @(negedge clk); bus_we = 1; bus_addr = a; bus_wdata = d;
    @(negedge clk); bus_we = 0;
  endtask

  task automatic chk_rd(input logic [2:0] a, input logic [7:0] exp, input string what);
    bus_addr = a; #1;
    chk(bus_rdata == exp, what);
  endtask

  initial begin
    #2000 $display("FAIL: watchdog"); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    chk(cfg.n_div == 2 && cfg.isel == SEL_CIC && cfg.cic_shift == 2 &&
        cfg.mode == MOD_MULTILVL && cfg.clk_shift == 0, "reset values");
    wr(0, 8'd7);  chk(cfg.n_div == 7, "n_div write");   chk_rd(0, 8'd7, "n_div read");
    wr(0, 8'd1);  chk(cfg.n_div == 2, "n_div limited to 2");
    wr(0, 8'd16); chk_rd(0, 8'd16, "n_div 16");
    wr(1, 8'd1);  chk(cfg.isel == SEL_HBF2, "isel write"); chk_rd(1, 8'd1, "isel read");
    wr(2, 8'd9);  chk(cfg.cic_shift == 9, "shift write");  chk_rd(2, 8'd9, "shift read");
    wr(3, 8'd1);  chk(cfg.mode == MOD_POLAR, "mode write"); chk_rd(3, 8'd1, "mode read");
    wr(4, 8'd3);  chk(cfg.clk_shift == 3, "clk_shift write"); chk_rd(4, 8'd3, "clk_shift read");
    wr(6, 8'hff); chk(cfg.n_div == 16 && cfg.isel == SEL_HBF2 && cfg.cic_shift == 9 &&
                      cfg.mode == MOD_POLAR && cfg.clk_shift == 3, "unmapped write ignored");
    chk_rd(6, 8'h00, "unmapped read zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
