// scs_core: signal component separator for one time-interleaved slot.
//
// Turns one interpolated I/Q sample into the signals of the selected
// transmitter architecture:
//   Cartesian            I, Q passed through
//   polar                A = |I + jQ| and phi = atan2(Q, I)
//   outphasing           amplitude 0.5, phi1 = phi + theta, phi2 = phi - theta,
//                        theta = acos(A)
//   multilevel outphasing
//                        A_mo = ceil(A * AMAX) limited to 1..AMAX,
//                        A_MOP = A_mo / (2 AMAX),
//                        theta = acos(A * AMAX / A_mo), phi1, phi2 as above
// The datapath is: vectoring CORDIC (A, phi) -> level stage (A clamped to
// 1, A*AMAX, A_mo) -> ratio stage (A*AMAX times a constant reciprocal of
// A_mo) -> double-iteration arccos CORDIC -> output stage.  The output
// stage forms phi1 and phi2, adds 2*pi to a negative phase (and removes it
// from one of 2*pi or more) to map it onto [0, 2*pi), and rounds it to
// OUT_RES bits; A is rounded to Q0.7.  Delay lines balance the amplitude,
// phase and I/Q paths so every field of a sample leaves together.
//
// Generation parameter SCS_TYPE (0 Cartesian, 1 polar, 2 outphasing,
// 3 multilevel outphasing) decides how much hardware is built: type 0
// builds no CORDIC, type 1 the vectoring CORDIC only, types 2 and 3 the
// full core, which outphasing and multilevel outphasing share.  The
// run-time mode chooses among the architectures the built hardware
// supports; a higher mode falls back to the highest supported one.
//
// Interface: the pipeline advances on en (the f_Clk/k strobe); in/in_valid
// are taken when en is high and out/out_valid appear LAT enabled cycles
// later (LAT = 36 for types 2 and 3, 18 for type 1, 1 for type 0).  The
// field meanings of out are listed with scs_out_t in dsp_pkg.  The
// equations and the 7-bit output follow the source (OUT_RES may be 1..7;
// a shorter code sits right-aligned in the 7-bit fields); AMAX = 4, the
// fixed-point formats and the rounding are this design's choices.
module scs_core
  import dsp_pkg::*;
#(
  parameter int unsigned SCS_TYPE = 3,
  parameter int unsigned OUT_RES  = 7,
  parameter int unsigned AMAX     = 4,
  parameter int unsigned ITER     = 15
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     en,
  input  mod_t     mode,
  input  logic     in_valid,
  input  iq_t      in,
  output logic     out_valid,
  output scs_out_t out
);

  localparam int unsigned LV  = ITER + 2;  // vectoring CORDIC latency
  localparam int unsigned LA  = ITER + 1;  // arccos CORDIC latency
  localparam int unsigned LAT = (SCS_TYPE >= 2) ? LV + 2 + LA + 1 :
                                (SCS_TYPE == 1) ? LV + 1 : 1;
  localparam int unsigned AW  = $clog2(AMAX + 1);
  localparam logic [ANG_W+2:0] TWO_PI = (ANG_W+3)'(1) <<< ANG_W;

  typedef logic signed [ANG_W:0] ang_t;

  // The output fields of scs_out_t are 7 bits wide; a coarser phase code is
  // right-aligned in them.
  if (OUT_RES < 1 || OUT_RES > 7) begin : g_bad_out_res
    $error("scs_core: OUT_RES must be 1..7 to fit scs_out_t");
  end

  // Reciprocal of a level, Q0.16, computed at elaboration.
  function automatic logic [16:0] recip(input logic [AW-1:0] a);
    int unsigned den;
    den = (a == '0) ? 1 : 32'(a);
    return 17'((32'd65536 + den / 2) / den);
  endfunction

  // Map an angle in (-2pi, 4pi) onto [0, 2pi) and round it to OUT_RES bits.
  function automatic logic [OUT_RES-1:0] wrap_q(input logic signed [ANG_W+2:0] p);
    logic signed [ANG_W+2:0] w;
    logic        [ANG_W:0]   r;
    w = p;
    if (w < 0)               w = w + TWO_PI;
    else if (w >= TWO_PI)    w = w - TWO_PI;
    r = w[ANG_W:0] + (ANG_W+1)'(1 << (ANG_W - OUT_RES - 1));
    return r[ANG_W-1 -: OUT_RES];   // 2pi - half step rounds to 0, modulo 2pi
  endfunction

  // A in Q1.14 (0..1) to unsigned Q0.7, saturated at 127.
  function automatic logic [6:0] amp_q(input sample_t a);
    logic [15:0] r;
    r = 16'(a) + 16'd64;
    return (r[15:7] > 9'd127) ? 7'd127 : r[13:7];
  endfunction

  mod_t eff_mode;
  always_comb begin
    if (32'(mode) > SCS_TYPE) eff_mode = mod_t'(SCS_TYPE[1:0]);
    else                      eff_mode = mode;
  end

  // Cartesian path: I/Q delayed to the output stage.
  iq_t iq_d;
  pipe_delay #(.W($bits(iq_t)), .DEPTH(LAT - 1)) u_iq_dly (
    .clk, .rst_n, .en, .d(in), .q(iq_d)
  );

  logic     v_d;
  scs_out_t nxt;

  if (SCS_TYPE == 0) begin : g_cart
    assign v_d = in_valid;
    always_comb begin
      nxt       = '0;
      nxt.a_i   = iq_d.i;
      nxt.q_ph2 = iq_d.q;
    end
  end else begin : g_polar
    // Vectoring CORDIC.
    logic    vv;
    sample_t mag;
    ang_t    phi;
    cordic_vec #(.ITER(ITER)) u_vec (
      .clk, .rst_n, .en, .in_valid, .i(in.i), .q(in.q),
      .out_valid(vv), .mag, .phase(phi)
    );

    sample_t a_c;   // A clamped to [0, 1]
    assign a_c = (mag > 16'sd16384) ? 16'sd16384 : mag;

    if (SCS_TYPE == 1) begin : g_p
      assign v_d = vv;
      always_comb begin
        nxt           = '0;
        nxt.a_i       = sample_t'(amp_q(a_c));
        nxt.ph1       = wrap_q((ANG_W+3)'(phi));
        if (eff_mode == MOD_CARTESIAN) begin
          nxt.a_i     = iq_d.i;
          nxt.ph1     = '0;
          nxt.q_ph2   = iq_d.q;
        end
      end
    end else begin : g_op
      // Level stage.
      logic [AW+15:0] amx_b;     // A*AMAX, Q.14
      logic [AW-1:0]  amo_b;     // A_mo
      sample_t        a_b;
      logic           v_b;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          amx_b <= '0;
          amo_b <= '0;
          a_b   <= '0;
          v_b   <= 1'b0;
        end else if (en) begin
          logic [AW+15:0] amx;
          logic [AW+15:0] lvl;
          amx   = (AW+16)'(a_c) * (AW+16)'(AMAX);
          lvl   = (amx + (AW+16)'(16383)) >> FRAC_W;      // ceil
          if (lvl == '0)                   lvl = (AW+16)'(1);
          else if (lvl > (AW+16)'(AMAX))   lvl = (AW+16)'(AMAX);
          amx_b <= amx;
          amo_b <= lvl[AW-1:0];
          a_b   <= a_c;
          v_b   <= vv;
        end
      end

      // Ratio stage: t = A*AMAX / A_mo (multilevel) or A (outphasing).
      sample_t       t_c;
      logic [AW-1:0] amo_c;
      sample_t       a_cc;
      logic          v_c;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          t_c   <= '0;
          amo_c <= '0;
          a_cc  <= '0;
          v_c   <= 1'b0;
        end else if (en) begin
          logic [AW+33:0] r;
          r = (AW+34)'(amx_b) * (AW+34)'(recip(amo_b)) + (AW+34)'(32768);
          r = r >> 16;
          if (eff_mode == MOD_MULTILVL)
            t_c <= (r > (AW+34)'(16384)) ? 16'sd16384 : sample_t'(r[15:0]);
          else
            t_c <= a_b;
          amo_c <= amo_b;
          a_cc  <= a_b;
          v_c   <= v_b;
        end
      end

      // Arccos CORDIC.
      logic vt;
      ang_t theta;
      cordic_acos #(.ITER(ITER)) u_acos (
        .clk, .rst_n, .en, .in_valid(v_c), .t(t_c),
        .out_valid(vt), .theta
      );
      assign v_d = vt;

      // Balance phi (from the vectoring output) and A, A_mo (from the
      // ratio stage) against the arccos latency.
      ang_t          phi_d;
      sample_t       a_d;
      logic [AW-1:0] amo_d;
      pipe_delay #(.W(ANG_W+1), .DEPTH(LA + 2)) u_phi_dly (
        .clk, .rst_n, .en, .d(phi), .q(phi_d)
      );
      pipe_delay #(.W(16 + AW), .DEPTH(LA)) u_amp_dly (
        .clk, .rst_n, .en, .d({a_cc, amo_c}), .q({a_d, amo_d})
      );

      always_comb begin
        logic signed [ANG_W+2:0] p, th;
        p  = (ANG_W+3)'(phi_d);
        th = (ANG_W+3)'(theta);
        nxt = '0;
        unique case (eff_mode)
          MOD_CARTESIAN: begin
            nxt.a_i   = iq_d.i;
            nxt.q_ph2 = iq_d.q;
          end
          MOD_POLAR: begin
            nxt.a_i   = sample_t'(amp_q(a_d));
            nxt.ph1   = wrap_q(p);
          end
          MOD_OUTPHASE: begin
            nxt.amp_lvl = 7'd64;                        // 0.5
            nxt.a_i     = sample_t'(amp_q(a_d));
            nxt.ph1     = wrap_q(p + th);
            nxt.q_ph2   = sample_t'(wrap_q(p - th));
          end
          default: begin                                  // multilevel
            nxt.amp_lvl = 7'((32'(amo_d) * 64) / AMAX);   // A_mo / (2 AMAX)
            nxt.a_i     = sample_t'(amp_q(a_d));
            nxt.ph1     = wrap_q(p + th);
            nxt.q_ph2   = sample_t'(wrap_q(p - th));
          end
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out       <= '0;
      out_valid <= 1'b0;
    end else if (en) begin
      out       <= nxt;
      out_valid <= v_d;
    end
  end

endmodule
