// ctrl_bus: register file behind the unified control bus.
//
// The control bus carries the run-time operation parameters of the DSP
// (clock divider ratio, interpolation tap, CIC scaling, modulation and
// clock-phase shift) to the modules.  The source names the bus but not its
// protocol; this implementation uses a simple synchronous register port:
// a write takes effect on the clock edge where bus_we is high, and
// bus_rdata returns the addressed register combinationally.
//
// Register map (8-bit data):
//   0  n_div     [4:0]  divider ratio n, values below 2 are stored as 2
//   1  isel      [1:0]  0 = HBF1, 1 = HBF2, 2 = HBF3, 3 = CIC
//   2  cic_shift [3:0]  right shift applied to the CIC output
//   3  mode      [1:0]  0 Cartesian, 1 polar, 2 outphasing, 3 multilevel
//   4  clk_shift [1:0]  phase offset of the f_Clk/k strobe
// Reset values give the main configuration: n = 2, CIC tap (x16),
// shift 2 (CIC gain n^2 = 4), multilevel outphasing, no phase offset.
module ctrl_bus
  import dsp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_we,
  input  logic [2:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata,
  output cfg_t       cfg
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.n_div     <= 5'd2;
      cfg.isel      <= SEL_CIC;
      cfg.cic_shift <= 4'd2;
      cfg.mode      <= MOD_MULTILVL;
      cfg.clk_shift <= 2'd0;
    end else if (bus_we) begin
      unique case (bus_addr)
        3'd0: cfg.n_div     <= (bus_wdata[4:0] < 5'd2) ? 5'd2 : bus_wdata[4:0];
        3'd1: cfg.isel      <= isel_t'(bus_wdata[1:0]);
        3'd2: cfg.cic_shift <= bus_wdata[3:0];
        3'd3: cfg.mode      <= mod_t'(bus_wdata[1:0]);
        3'd4: cfg.clk_shift <= bus_wdata[1:0];
        default: ;
      endcase
    end
  end

  always_comb begin
    unique case (bus_addr)
      3'd0:    bus_rdata = {3'b0, cfg.n_div};
      3'd1:    bus_rdata = {6'b0, cfg.isel};
      3'd2:    bus_rdata = {4'b0, cfg.cic_shift};
      3'd3:    bus_rdata = {6'b0, cfg.mode};
      3'd4:    bus_rdata = {6'b0, cfg.clk_shift};
      default: bus_rdata = 8'h00;
    endcase
  end

endmodule
