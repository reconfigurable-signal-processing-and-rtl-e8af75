// interpolator: programmable interpolation chain HBF1 - HBF2 - HBF3 - CIC.
//
// Three half-band interpolators by 2 (31, 15 and 7 taps) raise the
// baseband rate by 8; the third-order CIC then interpolates by n, the
// clock-divider ratio, for a total of 8n (16, 24, ..., 128 for n = 2..16).
// With n = 2 the stage rates are those of the source's main
// configuration: baseband f_Clk/16, HBF1 out f_Clk/8, HBF2 out f_Clk/4,
// HBF3 out f_Clk/2, CIC out f_Clk as K = 4 samples per f_Clk/4 period.
// The output multiplexer can instead take HBF1, HBF2 or HBF3 (factors 2,
// 4, 8) through the deserializer.
//
// Timing: the baseband sample bb is taken on every ce_8n strobe (it must
// be valid in that cycle); the other strobes come from clk_div.  The
// output is a K-lane word (lanes[0] oldest) with valid, changing at ce_k.
module interpolator
  import dsp_pkg::*;
#(
  parameter int unsigned K     = 4,
  parameter int unsigned CIC_W = 28
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_n,
  input  logic       ce_2n,
  input  logic       ce_4n,
  input  logic       ce_8n,
  input  logic       ce_k,
  input  isel_t      sel,
  input  logic [3:0] cic_shift,
  input  iq_t        bb,
  output iq_t        lanes [K],
  output logic       valid
);

  iq_t h1, h2, h3;
  iq_t cic_y [K];

  hbf #(.NTAPS(31)) u_hbf1 (.clk, .rst_n, .ce_in(ce_8n), .ce_out(ce_4n), .x(bb), .y(h1));
  hbf #(.NTAPS(15)) u_hbf2 (.clk, .rst_n, .ce_in(ce_4n), .ce_out(ce_2n), .x(h1), .y(h2));
  hbf #(.NTAPS(7))  u_hbf3 (.clk, .rst_n, .ce_in(ce_2n), .ce_out(ce_n),  .x(h2), .y(h3));

  cic #(.K(K), .CIC_W(CIC_W)) u_cic (
    .clk, .rst_n, .ce_n, .ce_k, .shift(cic_shift), .x(h3), .y(cic_y)
  );

  deser #(.K(K)) u_deser (
    .clk, .rst_n, .sel,
    .h1, .s1(ce_4n), .h2, .s2(ce_2n), .h3, .s3(ce_n),
    .cic_y, .ce_k, .lanes, .valid
  );

endmodule
