// pmf_pkg: shared types and constants of the texture based CU/PU pre-mode filter.
//
// The pre-mode filter estimates, from the source texture alone, the RD cost of a
// coding block (CB) coded whole and coded as four quarters, and uses the two numbers
// to drop CU/PU candidates before the real RDO runs. This package holds what the
// filter's units share:
//   * fixed-point formats. Qs^2, estimated prediction error power (PE) and RD costs
//     are unsigned with FRAC = 8 fraction bits; model coefficients a and b_k are
//     unsigned with COEF_FRAC = 12 fraction bits. These formats are this design's
//     choice; the method itself is stated in real numbers.
//   * the CB class (edge direction category D0..D3, directional homogeneity,
//     strength group M0..M6) and its mapping to one of 56 linear models
//     (2 x 4 x 7), as the method defines it.
//   * the rate weight w_r of the cost model in eighths, per block size and per band
//     of PE/Qs^2, and the side-information cost 3*7/64*(4+1) of a split.
//   * the strength thresholds that separate M0..M6. The method sorts blocks into seven
//     groups by maximum edge strength but gives no numbers; the defaults below
//     double the gradient magnitude from group to group and are this design's choice.
package pmf_pkg;

  localparam int PIX_W      = 8;    // luma sample width
  localparam int CB_LOG2    = 5;    // the filter works on 32x32 CBs
  localparam int CB_N       = 1 << CB_LOG2;
  localparam int CB_PIX     = CB_N * CB_N;
  localparam int NUM_LEVELS = 4;    // block sizes 4, 8, 16, 32 (level l has N = 4 << l)

  localparam int NUM_BINS   = 33;   // one histogram cell per angular mode 2..34
  localparam int HIST_W     = 11;   // holds a count of up to 1024 pixels
  localparam int NUM_STRENGTH = 7;  // M0..M6
  localparam int NUM_DIR    = 4;    // D0..D3
  localparam int NUM_MODELS = 2 * NUM_DIR * NUM_STRENGTH;  // 56
  localparam int MODEL_W    = 6;

  localparam int GRAD_W     = 12;   // signed Sobel gradient, |g| <= 1020
  localparam int ES_W       = 21;   // eh^2 + ev^2 <= 2 * 1020^2

  localparam int COEF_W     = 16;
  localparam int COEF_FRAC  = 12;
  localparam int FRAC       = 8;
  localparam int QS2_W      = 26;   // Q2[5] << 16, Q.8
  localparam int PE_W       = 44;
  localparam int RD_W       = 64;

  // 3 * 7/64 * (gamma_mode + gamma_cbf) = 105/64, in Q.8
  localparam logic [RD_W-1:0] SPLIT_OVERHEAD = RD_W'(105 * (1 << FRAC) / 64);

  // Pixels with an edge strength below this do not vote in the direction histogram.
  localparam logic [ES_W-1:0] EDGE_MIN_ES = ES_W'(16);

  // Lower bounds of strength groups M1..M6 on the maximum edge strength of a CB.
  localparam logic [ES_W-1:0] STRENGTH_TH [NUM_STRENGTH-1] = '{
    ES_W'(256), ES_W'(1024), ES_W'(4096), ES_W'(16384), ES_W'(65536), ES_W'(262144)
  };

  typedef enum logic [1:0] {
    DIR_D0 = 2'd0,  // horizontal-like, modes 7..13
    DIR_D1 = 2'd1,  // vertical-like, modes 23..29
    DIR_D2 = 2'd2,  // -45 degree-like, modes 14..22
    DIR_D3 = 2'd3   // all other modes
  } dir_cat_e;

  typedef struct packed {
    logic       homog;     // directionally homogeneous
    dir_cat_e   dir;       // category of the prominent angle
    logic [2:0] strength;  // M0..M6
  } cb_class_t;

  function automatic logic [MODEL_W-1:0] model_index(cb_class_t c);
    return MODEL_W'(c.homog) * MODEL_W'(28) + MODEL_W'(c.dir) * MODEL_W'(7)
           + MODEL_W'(c.strength);
  endfunction

  // Rate weight w_r * 8, indexed by level (N = 4 << level) and band
  // b = 0..7 for PE/Qs^2 in [0,1/8), [1/8,1/4), [1/4,1/2), [1/2,1), [1,2), [2,4),
  // [4,8), [8,inf).
  function automatic logic [10:0] omega_r8(logic [1:0] level, logic [2:0] band);
    logic [10:0] t4  [8] = '{11'd0, 11'd1, 11'd2, 11'd4, 11'd8,   11'd8,   11'd8,   11'd8};
    logic [10:0] t8  [8] = '{11'd0, 11'd4, 11'd8, 11'd32, 11'd128, 11'd256, 11'd256, 11'd256};
    logic [10:0] t16 [8] = '{11'd0, 11'd1, 11'd2, 11'd4, 11'd8,   11'd16,  11'd32,  11'd128};
    logic [10:0] t32 [8] = '{11'd0, 11'd0, 11'd4, 11'd16, 11'd64,  11'd256, 11'd512, 11'd1024};
    case (level)
      2'd0:    return t4[band];
      2'd1:    return t8[band];
      2'd2:    return t16[band];
      default: return t32[band];
    endcase
  endfunction

endpackage
