// cordic_acos: pipelined double-iteration CORDIC for theta = acos(t).
//
// Starts from the unit vector (x, y) = (1, 0) with theta = 0 and t0 = t.
// In step n (n = 0 .. ITER-1) the direction is
//   d = sign(y)  if x >= t,   d = -sign(y)  otherwise   (sign(0) = +1),
// and the vector is rotated twice by d*atan(2^-n), so theta grows by
// 2*d*atan(2^-n).  A double rotation scales the vector by exactly
// (1 + 2^-2n), so the threshold is scaled by the same factor,
// t <- t + t*2^-2n, which removes the need for a gain correction.  The
// accumulated angle converges to +-acos(t) (mod 2*pi) and is folded onto
// [0, pi] at the output.
//
// Interface: t in Q1.14, clamped to [-1, 1]; theta in binary angle units,
// pi = 2^15, range [0, pi].  The pipeline advances on en; out_valid
// follows in_valid.  Latency: ITER + 1 enabled cycles.  The algorithm and
// ITER = 15 follow the source; the word length (24 bits, 20 fraction bits)
// is this design's.
module cordic_acos
  import dsp_pkg::*;
#(
  parameter int unsigned ITER = 15
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  en,
  input  logic                  in_valid,
  input  sample_t               t,
  output logic                  out_valid,
  output logic signed [ANG_W:0] theta
);

  localparam int unsigned CW = 24;
  localparam int unsigned FB = 20;   // fraction bits
  typedef logic signed [CW-1:0]    cw_t;
  typedef logic signed [ANG_W+1:0] ang_t;

  cw_t  x  [ITER+1];
  cw_t  y  [ITER+1];
  cw_t  tt [ITER+1];
  ang_t z  [ITER+1];
  logic v  [ITER+1];

  function automatic cw_t clamp_t(input sample_t tv);
    if (tv > 16'sd16384)       return cw_t'(1) <<< FB;
    else if (tv < -16'sd16384) return -(cw_t'(1) <<< FB);
    else                       return cw_t'(tv) <<< (FB - FRAC_W);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= ITER; s++) begin
        x[s]  <= '0;
        y[s]  <= '0;
        tt[s] <= '0;
        z[s]  <= '0;
        v[s]  <= 1'b0;
      end
    end else if (en) begin
      v[0]  <= in_valid;
      x[0]  <= cw_t'(1) <<< FB;
      y[0]  <= '0;
      tt[0] <= clamp_t(t);
      z[0]  <= '0;
      for (int s = 0; s < ITER; s++) begin
        logic up;
        cw_t  x1, y1;
        // up = 1: d = +1 (counter-clockwise), else d = -1
        up = (x[s] >= tt[s]) ? (y[s] >= 0) : (y[s] < 0);
        if (up) begin
          x1 = x[s] - (y[s] >>> s);
          y1 = y[s] + (x[s] >>> s);
          x[s+1] <= x1 - (y1 >>> s);
          y[s+1] <= y1 + (x1 >>> s);
          z[s+1] <= z[s] + ang_t'(2 * ATAN_TAB[s]);
        end else begin
          x1 = x[s] + (y[s] >>> s);
          y1 = y[s] - (x[s] >>> s);
          x[s+1] <= x1 + (y1 >>> s);
          y[s+1] <= y1 - (x1 >>> s);
          z[s+1] <= z[s] - ang_t'(2 * ATAN_TAB[s]);
        end
        tt[s+1] <= tt[s] + (tt[s] >>> (2 * s));
        v[s+1]  <= v[s];
      end
    end
  end

  assign out_valid = v[ITER];

  // The iteration converges to an angle whose cosine is t: +acos(t),
  // -acos(t) (when it crosses zero near t = 1) or 2*pi - acos(t) (when it
  // crosses pi near t = -1).  Fold it back onto [0, pi].
  always_comb begin
    ang_t a;
    a = z[ITER];
    if (a < 0)                    a = -a;
    else if (a > ang_t'(32768))   a = ang_t'(65536) - a;
    if (a > ang_t'(32768))        a = ang_t'(32768);
    theta = a[ANG_W:0];
  end

endmodule
