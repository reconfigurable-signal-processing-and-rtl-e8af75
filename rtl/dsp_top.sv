// dsp_top: reconfigurable transmitter DSP between a baseband source and
// the RF front end.
//
// Baseband I/Q samples enter at f_Clk/8n and are raised to up to f_Clk by
// the interpolator (three half-band stages and a CIC, total factor 8n, or
// 2/4/8 with a half-band tap), then converted by K time-interleaved signal
// component separators into Cartesian (I, Q), polar (A, phi), outphasing
// (0.5, phi1, phi2) or multilevel outphasing (A_MOP, phi1, phi2) signals,
// one sample per master cycle.  A clock divider makes the rate strobes
// from the master clock and a control-bus register file holds the run-time
// settings.  The local oscillator that supplies clk and the phase
// modulator/power amplifier fed by out are outside this module.
//
// Interface:
//   clk, rst_n              master clock f_Clk, asynchronous active-low reset
//   bus_we/addr/wdata/rdata control bus (register map in ctrl_bus)
//   bb_in, bb_ready         a baseband sample is taken in each cycle with
//                           bb_ready high (rate f_Clk/8n)
//   out, out_valid          output sample stream (fields in dsp_pkg)
// With the reset configuration (n = 2, CIC tap, multilevel outphasing) a
// baseband sample becomes 16 output samples, one every master cycle.
module dsp_top
  import dsp_pkg::*;
#(
  parameter int unsigned K        = 4,
  parameter int unsigned SCS_TYPE = 3,
  parameter int unsigned OUT_RES  = 7,
  parameter int unsigned AMAX     = 4,
  parameter int unsigned CIC_W    = 28
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       bus_we,
  input  logic [2:0] bus_addr,
  input  logic [7:0] bus_wdata,
  output logic [7:0] bus_rdata,
  input  iq_t        bb_in,
  output logic       bb_ready,
  output logic       out_valid,
  output scs_out_t   out
);

  cfg_t                 cfg;
  logic                 ce_n, ce_2n, ce_4n, ce_8n, ce_k;
  logic [$clog2(K)-1:0] k_phase;
  iq_t                  lanes [K];
  logic                 lanes_valid;

  ctrl_bus u_ctrl (
    .clk, .rst_n, .bus_we, .bus_addr, .bus_wdata, .bus_rdata, .cfg
  );

  clk_div #(.K(K)) u_clkdiv (
    .clk, .rst_n, .n_div(cfg.n_div), .clk_shift(cfg.clk_shift[$clog2(K)-1:0]),
    .ce_n, .ce_2n, .ce_4n, .ce_8n, .ce_k, .k_phase
  );

  interpolator #(.K(K), .CIC_W(CIC_W)) u_interp (
    .clk, .rst_n, .ce_n, .ce_2n, .ce_4n, .ce_8n, .ce_k,
    .sel(cfg.isel), .cic_shift(cfg.cic_shift), .bb(bb_in),
    .lanes, .valid(lanes_valid)
  );

  scs_ti #(.K(K), .SCS_TYPE(SCS_TYPE), .OUT_RES(OUT_RES), .AMAX(AMAX)) u_scs (
    .clk, .rst_n, .ce_k, .k_phase, .mode(cfg.mode),
    .in_valid(lanes_valid), .lanes, .out_valid, .out
  );

  assign bb_ready = ce_8n;

endmodule
