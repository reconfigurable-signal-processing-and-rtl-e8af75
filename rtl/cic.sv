// cic: third-order CIC interpolator with integrators unrolled by K.
//
// H(z) = [(1 - z^-L)/(1 - z^-1)]^3 with L = n, the clock-divider ratio.
// The three combs run on the f_Clk/n strobe ce_n.  The comb output is
// up-sampled by L on the master clock: in a ce_n cycle the newest comb
// result is inserted, in the other L-1 cycles a zero.  A K-deep
// serial-to-parallel register collects K consecutive up-sampled values and
// hands them, on each f_Clk/k strobe ce_k, to three integrators unrolled
// by K: each computes the K running sums
//   y(Kn-j) = y(Kn-K) + x(Kn-K+1) + ... + x(Kn-j),  j = K-1 .. 0
// at once from the last sum of the previous block, so an integrator that
// would run at f_Clk runs at f_Clk/K.  The integrators use wrap-around
// arithmetic of CIC_W bits; CIC_W = 16 + 3*log2(16) covers the growth of
// the largest ratio n = 16, so the wrapped result is exact.
// The DC gain is n^2; the output is divided by 2^shift (rounded) and
// saturated to Q1.14.
//
// Interface: x is the comb input, sampled at ce_n (it must hold for the
// whole f_Clk/n period).  y[0..K-1] are K consecutive output samples,
// y[0] the oldest; they change at ce_k and hold for the f_Clk/k period.
// The order N = 3, the unrolling K = 4 and the integrator equations follow
// the source; widths, scaling and the up-sampler are this design's own.
module cic
  import dsp_pkg::*;
#(
  parameter int unsigned K     = 4,
  parameter int unsigned CIC_W = 28
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_n,
  input  logic       ce_k,
  input  logic [3:0] shift,
  input  iq_t        x,
  output iq_t        y [K]
);

  typedef logic signed [CIC_W-1:0] acc_t;
  localparam int unsigned NST = 3;

  // Two channels, I (0) and Q (1).
  acc_t c_in   [2];
  acc_t c_prev [2][NST];   // delay element of each comb
  acc_t c_out  [2][NST];   // registered output of each comb
  acc_t up     [2];        // up-sampled comb output
  acc_t sr     [2][K-1];   // serial-to-parallel register, sr[.][0] newest
  acc_t blk    [2][K];     // current block, blk[.][0] oldest
  acc_t integ  [2][NST][K];

  assign c_in[0] = CIC_W'(x.i);
  assign c_in[1] = CIC_W'(x.q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++)
        for (int s = 0; s < NST; s++) begin
          c_prev[c][s] <= '0;
          c_out[c][s]  <= '0;
        end
    end else if (ce_n) begin
      for (int c = 0; c < 2; c++) begin
        c_prev[c][0] <= c_in[c];
        c_out[c][0]  <= c_in[c] - c_prev[c][0];
        for (int s = 1; s < NST; s++) begin
          c_prev[c][s] <= c_out[c][s-1];
          c_out[c][s]  <= c_out[c][s-1] - c_prev[c][s];
        end
      end
    end
  end

  always_comb begin
    for (int c = 0; c < 2; c++) begin
      up[c] = ce_n ? c_out[c][NST-1] : '0;
      blk[c][K-1] = up[c];
      for (int j = 0; j < K-1; j++) blk[c][j] = sr[c][K-2-j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++)
        for (int j = 0; j < K-1; j++) sr[c][j] <= '0;
    end else begin
      for (int c = 0; c < 2; c++) begin
        sr[c][0] <= up[c];
        for (int j = 1; j < K-1; j++) sr[c][j] <= sr[c][j-1];
      end
    end
  end

  // Unrolled integrators: running sums over a block of K.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int c = 0; c < 2; c++)
        for (int s = 0; s < NST; s++)
          for (int j = 0; j < K; j++) integ[c][s][j] <= '0;
    end else if (ce_k) begin
      for (int c = 0; c < 2; c++)
        for (int s = 0; s < NST; s++) begin
          acc_t run;
          run = integ[c][s][K-1];
          for (int j = 0; j < K; j++) begin
            run = run + ((s == 0) ? blk[c][j] : integ[c][s-1][j]);
            integ[c][s][j] <= run;
          end
        end
    end
  end

  function automatic sample_t scale(input acc_t v, input logic [3:0] sh);
    logic signed [39:0] w;
    w = 40'(v);
    if (sh != 4'd0) w = w + (40'sd1 <<< (sh - 4'd1));
    return sat16(w >>> sh);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < K; j++) y[j] <= '0;
    end else if (ce_k) begin
      for (int j = 0; j < K; j++) begin
        y[j].i <= scale(integ[0][NST-1][j], shift);
        y[j].q <= scale(integ[1][NST-1][j], shift);
      end
    end
  end

endmodule
