// cordic_vec: pipelined vectoring CORDIC, I/Q to amplitude and phase.
//
// Computes A = sqrt(I^2 + Q^2) and phi = atan2(Q, I), the polar
// components of a baseband sample.  A first stage folds the left half
// plane onto the right one (negating the vector and starting the angle at
// +pi or -pi).  ITER shift-and-add stages (i = 0 .. ITER-1) then rotate by
// -/+ atan(2^-i) to drive y to zero while accumulating the angle.  A last
// stage multiplies x by 1/K, the inverse CORDIC gain (0.60725 for 15
// iterations).  Every stage is a register stage, in place of an iterative
// loop, so one sample is accepted per enabled cycle.
//
// Interface: i, q in Q1.14; mag in Q1.14 (saturated at 32767); phase in
// binary angle units with pi = 2^15, signed, range [-pi, pi].  The pipeline
// advances on en; out_valid follows in_valid.  Latency: ITER + 2 enabled
// cycles.  The 15 iterations and the unrolled pipeline follow the source;
// the internal word length (24 bits, 18 fraction bits) is this design's.
module cordic_vec
  import dsp_pkg::*;
#(
  parameter int unsigned ITER = 15
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      in_valid,
  input  sample_t                   i,
  input  sample_t                   q,
  output logic                      out_valid,
  output sample_t                   mag,
  output logic signed [ANG_W:0]     phase
);

  localparam int unsigned CW = 24;
  localparam int unsigned GS = 4;   // guard bits below the Q1.14 LSB
  typedef logic signed [CW-1:0]    cw_t;
  typedef logic signed [ANG_W+1:0] ang_t;   // one spare bit over [-pi, pi]

  cw_t  x [ITER+1];
  cw_t  y [ITER+1];
  ang_t z [ITER+1];
  logic v [ITER+2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= ITER; s++) begin
        x[s] <= '0;
        y[s] <= '0;
        z[s] <= '0;
      end
      for (int s = 0; s <= ITER + 1; s++) v[s] <= 1'b0;
      mag   <= '0;
      phase <= '0;
    end else if (en) begin
      // Stage 0: fold into the right half plane.
      v[0] <= in_valid;
      if (i < 0) begin
        x[0] <= -(cw_t'(i) <<< GS);
        y[0] <= -(cw_t'(q) <<< GS);
        z[0] <= (q < 0) ? -ang_t'(32768) : ang_t'(32768);
      end else begin
        x[0] <= cw_t'(i) <<< GS;
        y[0] <= cw_t'(q) <<< GS;
        z[0] <= '0;
      end
      // Stages 1..ITER: micro-rotations.
      for (int s = 0; s < ITER; s++) begin
        v[s+1] <= v[s];
        if (y[s] < 0) begin
          x[s+1] <= x[s] - (y[s] >>> s);
          y[s+1] <= y[s] + (x[s] >>> s);
          z[s+1] <= z[s] - ang_t'(ATAN_TAB[s]);
        end else begin
          x[s+1] <= x[s] + (y[s] >>> s);
          y[s+1] <= y[s] - (x[s] >>> s);
          z[s+1] <= z[s] + ang_t'(ATAN_TAB[s]);
        end
      end
      // Last stage: gain compensation and output formatting.
      v[ITER+1] <= v[ITER];
      mag       <= scale_mag(x[ITER]);
      phase     <= clamp_ang(z[ITER]);
    end
  end

  assign out_valid = v[ITER+1];

  function automatic sample_t scale_mag(input cw_t xv);
    logic signed [47:0] p;
    p = 48'(xv) * 48'sd39797;                       // x * 1/K, Q0.16 constant
    p = (p + (48'sd1 <<< (15 + GS))) >>> (16 + GS);  // back to Q1.14, rounded
    return sat16(40'(p));
  endfunction

  function automatic logic signed [ANG_W:0] clamp_ang(input ang_t a);
    if (a > ang_t'(32768))       return (ANG_W+1)'(32768);
    else if (a < -ang_t'(32768)) return -(ANG_W+1)'(32768);
    else                         return a[ANG_W:0];
  endfunction

endmodule
