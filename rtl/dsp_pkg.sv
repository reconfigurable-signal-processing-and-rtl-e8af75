// dsp_pkg: types and constants shared by the transmitter DSP.
//
// Samples are complex I/Q pairs in signed Q1.14 (sign, one integer bit,
// fourteen fraction bits), the input format of the design.  Angles are
// binary angles: a 16-bit word where 2^16 is one full turn, so pi is 2^15.
// The half-band coefficient sets below come from a remez half-band
// design by this implementation (the source gives only the tap counts);
// they are the even polyphase branch scaled by the interpolation gain 2
// and rounded to Q1.14.  Plain rounding keeps the equiripple stop band
// (about 61, 71 and 60 dB) at the cost of a DC gain 0.1 to 0.2 % below one.
package dsp_pkg;

  localparam int unsigned IN_W   = 16;   // Q1.14 data word
  localparam int unsigned FRAC_W = 14;
  localparam int unsigned ANG_W  = 16;   // binary angle, 2^16 = 2*pi

  typedef logic signed [IN_W-1:0] sample_t;

  typedef struct packed {
    sample_t i;
    sample_t q;
  } iq_t;

  // Run-time modulation select of the signal component separator.
  typedef enum logic [1:0] {
    MOD_CARTESIAN = 2'd0,
    MOD_POLAR     = 2'd1,
    MOD_OUTPHASE  = 2'd2,
    MOD_MULTILVL  = 2'd3
  } mod_t;

  // Tap selected by the interpolator output multiplexer.
  typedef enum logic [1:0] {
    SEL_HBF1 = 2'd0,   // interpolation x2
    SEL_HBF2 = 2'd1,   // x4
    SEL_HBF3 = 2'd2,   // x8
    SEL_CIC  = 2'd3    // x8n
  } isel_t;

  // Run-time operation parameters held by the control bus.
  typedef struct packed {
    logic [4:0] n_div;      // clock divider ratio n (= CIC ratio L), 2..16
    isel_t      isel;       // interpolator output tap
    logic [3:0] cic_shift;  // CIC output scaling, right shift
    mod_t       mode;       // SCS modulation
    logic [1:0] clk_shift;  // phase of the f_Clk/k strobe
  } cfg_t;

  // One output sample of the SCS; the four channels follow the four
  // output multiplexers of the SCS drawing.
  //   amp_lvl : A_MOP (multilevel) or 0.5 (outphasing), unsigned Q0.OUT_RES
  //   a_i     : I (Cartesian) or A (other modes, unsigned Q0.7 in bits 6:0)
  //   ph1     : phi1 (outphasing, multilevel) or phi (polar), 7-bit phase
  //   q_ph2   : Q (Cartesian) or phi2 (outphasing, multilevel, bits 6:0)
  typedef struct packed {
    logic [6:0] amp_lvl;
    sample_t    a_i;
    logic [6:0] ph1;
    sample_t    q_ph2;
  } scs_out_t;

  // Half-band even-branch coefficients, first half (the branch is symmetric).
  localparam int HBF1_C [8] = '{-48, 124, -269, 517, -928, 1647, -3196, 10334};
  localparam int HBF2_C [4] = '{-122, 674, -2370, 10006};
  localparam int HBF3_C [2] = '{-1186, 9363};

  // atan(2^-i) in binary-angle units (pi = 32768), i = 0..14.
  localparam int ATAN_TAB [15] = '{8192, 4836, 2555, 1297, 651, 326, 163, 81,
                                   41, 20, 10, 5, 3, 1, 1};

  // 1/K of a 15-iteration CORDIC (0.607253) in Q0.16.
  localparam int CORDIC_INV_GAIN = 39797;

  function automatic sample_t sat16(input logic signed [39:0] v);
    if (v > 40'sd32767)       return 16'sd32767;
    else if (v < -40'sd32768) return -16'sd32768;
    else                      return v[15:0];
  endfunction

endpackage
