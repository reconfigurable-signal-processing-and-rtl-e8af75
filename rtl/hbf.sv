// hbf: polyphase half-band interpolator by 2 (one stage of the chain).
//
// A half-band filter of NTAPS = 4M-1 taps has only 2M+1 non-zero
// coefficients: the centre tap and the taps an odd distance from it.  After
// interpolation by 2 the filter splits into two polyphase branches running
// at the input rate:
//   even branch  y(2n)   = sum_{m=0}^{2M-1} g[m] x(n-m)   (g symmetric)
//   odd branch   y(2n+1) = x(n-M+1)                     (centre tap = 1)
// The symmetry lets pairs x(n-m) + x(n-2M+1+m) be added before the
// multiply, so the even branch uses M multipliers and the odd branch none
// (31 taps: 8, 15 taps: 4, 7 taps: 2).  g is the even branch already
// multiplied by the interpolation gain 2, in Q1.14 (dsp_pkg).
//
// Timing: ce_in is the input-rate strobe and ce_out the output-rate
// strobe at twice that rate; every ce_in must coincide with a ce_out.  On
// ce_in, x is shifted into the delay line.  On the ce_out between two ce_in
// strobes y takes the even-branch result, and on the ce_out that coincides
// with the next ce_in it takes the odd-branch result, so the output
// sequence is y(2n), y(2n+1) and lags the input by one input period.
// Both I and Q are filtered with the same coefficients; results are
// rounded to Q1.14 and saturated.  The tap counts and branch structure
// follow the source; the coefficient values and word widths are this
// design's own.
module hbf
  import dsp_pkg::*;
#(
  parameter int unsigned NTAPS = 7
) (
  input  logic clk,
  input  logic rst_n,
  input  logic ce_in,
  input  logic ce_out,
  input  iq_t  x,
  output iq_t  y
);

  localparam int unsigned M = (NTAPS + 1) / 4;

  function automatic int coef(input int unsigned m);
    if (NTAPS == 31)      return HBF1_C[m];
    else if (NTAPS == 15) return HBF2_C[m];
    else                  return HBF3_C[m];
  endfunction

  sample_t di [2*M];   // I delay line, di[0] newest
  sample_t dq [2*M];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < 2*M; m++) begin
        di[m] <= '0;
        dq[m] <= '0;
      end
    end else if (ce_in) begin
      di[0] <= x.i;
      dq[0] <= x.q;
      for (int m = 1; m < 2*M; m++) begin
        di[m] <= di[m-1];
        dq[m] <= dq[m-1];
      end
    end
  end

  function automatic sample_t even_branch(input sample_t d [2*M]);
    logic signed [39:0] acc;
    logic signed [16:0] pre;
    acc = 40'sd8192;  // rounding constant, half an LSB of Q1.14
    for (int unsigned m = 0; m < M; m++) begin
      pre = 17'(d[m]) + 17'(d[2*M-1-m]);
      acc = acc + 40'(pre) * 40'(coef(m));
    end
    return sat16(acc >>> FRAC_W);
  endfunction

  iq_t y_even, y_odd;

  always_comb begin
    y_even.i = even_branch(di);
    y_even.q = even_branch(dq);
    y_odd.i  = di[M-1];
    y_odd.q  = dq[M-1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      y <= '0;
    else if (ce_out) y <= ce_in ? y_odd : y_even;
  end

  // A strobe of the input rate is also a strobe of the output rate.
  a_ce_aligned: assert property (@(posedge clk) disable iff (!rst_n) ce_in |-> ce_out);

endmodule
