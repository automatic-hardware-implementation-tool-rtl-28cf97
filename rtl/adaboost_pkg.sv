// adaboost_pkg -- constants and constant functions shared by the Adaboost
// decision function.
//
// Features are bytes (0..255), as in the byte-based implementation the design
// follows. A weak classifier's lower bound of 0 or upper bound of 255 means
// "no limit on that side": no comparator is built for it.
//
// The learned constants (hyperrectangle bounds, classes y_H and weights
// alpha_t) are parameters of the RTL, so every training run gives its own
// circuit. The functions below only supply a default model so that every
// module elaborates on its own. They describe an arbitrary but fixed mix of
// the three weak-classifier kinds (single threshold, single interval,
// general hyperrectangle over four features); the numbers have no meaning
// beyond exercising the hardware and are this design's choice.
package adaboost_pkg;

  // Width of one feature: the design works on bytes.
  localparam int unsigned FEAT_W = 8;
  localparam logic [FEAT_W-1:0] FEAT_MIN = '0;
  localparam logic [FEAT_W-1:0] FEAT_MAX = '1;

  // Inputs of one FPGA lookup table (16-bit LUT = 4 address bits): the number
  // of weak classifiers whose signed alphas are summed by one LUT.
  localparam int unsigned LUT_IN = 4;

  // Features carried by one 32-bit coprocessor bus word.
  localparam int unsigned BUS_W          = 32;
  localparam int unsigned FEAT_PER_WORD  = BUS_W / FEAT_W;

  // Feature source of the top level.
  typedef enum logic {
    SRC_PARALLEL = 1'b0,   // all D features at once, every clock
    SRC_BUS      = 1'b1    // four features per 32-bit bus word
  } src_e;

  // Kind of the t-th default weak classifier: 0 single threshold,
  // 1 single interval, 2 general hyperrectangle on four features.
  function automatic int unsigned dflt_kind(int unsigned t);
    return t % 3;
  endfunction

  function automatic int unsigned dflt_thr_dim(int unsigned t, int unsigned d_cnt);
    return (t * 7 + 3) % d_cnt;
  endfunction

  function automatic int unsigned dflt_int_dim(int unsigned t, int unsigned d_cnt);
    return (t * 11 + 5) % d_cnt;
  endfunction

  function automatic int unsigned dflt_box_dim(int unsigned t, int unsigned k,
                                               int unsigned d_cnt);
    return (t * 5 + k * 17 + 1) % d_cnt;
  endfunction

  // Lower bound theta^l of default classifier t in feature d (0 = none).
  function automatic logic [FEAT_W-1:0] dflt_theta_l(int unsigned t, int unsigned d,
                                                     int unsigned d_cnt);
    logic [FEAT_W-1:0] v;
    v = FEAT_MIN;
    case (dflt_kind(t))
      1: if (d == dflt_int_dim(t, d_cnt)) v = FEAT_W'(32 + (t * 13) % 64);
      2: for (int unsigned k = 0; k < 4; k++)
           if (d == dflt_box_dim(t, k, d_cnt)) v = FEAT_W'(16 + (t * 3 + k * 29) % 96);
      default: v = FEAT_MIN;
    endcase
    return v;
  endfunction

  // Upper bound theta^u of default classifier t in feature d (255 = none).
  function automatic logic [FEAT_W-1:0] dflt_theta_u(int unsigned t, int unsigned d,
                                                     int unsigned d_cnt);
    logic [FEAT_W-1:0] v;
    v = FEAT_MAX;
    case (dflt_kind(t))
      0: if (d == dflt_thr_dim(t, d_cnt)) v = FEAT_W'(64 + (t * 37) % 128);
      1: if (d == dflt_int_dim(t, d_cnt))
           v = FEAT_W'(32 + (t * 13) % 64 + 64 + (t * 5) % 64);
      2: for (int unsigned k = 0; k < 4; k++)
           if (d == dflt_box_dim(t, k, d_cnt))
             v = FEAT_W'(16 + (t * 3 + k * 29) % 96 + 80 + (t * 7 + k * 11) % 48);
      default: v = FEAT_MAX;
    endcase
    return v;
  endfunction

  // Class y_H of default classifier t: 1 stands for +1, 0 for -1.
  function automatic logic dflt_y(int unsigned t);
    return logic'(((t * 3) >> 1) & 1);
  endfunction

  // Weight alpha_t of default classifier t, an unsigned integer of a_w bits
  // (at least 1, below 2**a_w).
  function automatic int unsigned dflt_alpha(int unsigned t, int unsigned a_w);
    return 1 + (t * 53 + 97) % ((1 << a_w) - 1);
  endfunction

  // Whole default model, flattened. The parameters of the modules are packed
  // arrays [T-1:0][D-1:0][FEAT_W-1:0] (bounds), [T-1:0] (classes) and
  // [T-1:0][ALPHA_W-1:0] (weights); element (t, d) of a bound array sits at
  // bit (t*D + d)*FEAT_W. The functions fill that layout in the low bits of
  // a vector of fixed size and the module parameter keeps the bits it needs.
  // The default model therefore covers up to MODEL_ELEMS bound pairs
  // (T*D <= 16384, e.g. 256 weak classifiers on 64 features); larger
  // classifiers must be given their model explicitly.
  localparam int unsigned MODEL_ELEMS = 16384;
  localparam int unsigned MAX_T       = 4096;
  localparam int unsigned MAX_ALPHA_W = 16;

  typedef logic [MODEL_ELEMS*FEAT_W-1:0] bound_flat_t;
  typedef logic [MAX_T-1:0]              class_flat_t;
  typedef logic [MAX_T*MAX_ALPHA_W-1:0]  alpha_flat_t;

  function automatic bound_flat_t dflt_lower_all(int unsigned t_cnt, int unsigned d_cnt);
    bound_flat_t r = 0;
    for (int unsigned t = 0; t < t_cnt; t++)
      for (int unsigned d = 0; d < d_cnt; d++)
        if (t * d_cnt + d < MODEL_ELEMS)
          r[(t * d_cnt + d) * FEAT_W +: FEAT_W] = dflt_theta_l(t, d, d_cnt);
    return r;
  endfunction

  function automatic bound_flat_t dflt_upper_all(int unsigned t_cnt, int unsigned d_cnt);
    bound_flat_t r = 0;
    r = ~r;
    for (int unsigned t = 0; t < t_cnt; t++)
      for (int unsigned d = 0; d < d_cnt; d++)
        if (t * d_cnt + d < MODEL_ELEMS)
          r[(t * d_cnt + d) * FEAT_W +: FEAT_W] = dflt_theta_u(t, d, d_cnt);
    return r;
  endfunction

  function automatic class_flat_t dflt_class_all(int unsigned t_cnt);
    class_flat_t r = 0;
    for (int unsigned t = 0; t < t_cnt && t < MAX_T; t++) r[t] = dflt_y(t);
    return r;
  endfunction

  // Weights of a_w bits each, packed at bit t*a_w.
  function automatic alpha_flat_t dflt_alpha_all(int unsigned t_cnt, int unsigned a_w);
    alpha_flat_t r = 0;
    for (int unsigned t = 0; t < t_cnt; t++)
      for (int unsigned b = 0; b < a_w; b++)
        if (t * a_w + b < MAX_T * MAX_ALPHA_W)
          r[t * a_w + b] = 1'((dflt_alpha(t, a_w) >> b) & 1);
    return r;
  endfunction

  // Number of comparators (mu_t) a hyperrectangle needs: bounds that are
  // not rejected to the ends of the byte range.
  function automatic int unsigned bound_count(logic [FEAT_W-1:0] lo, logic [FEAT_W-1:0] hi);
    return int'(lo != FEAT_MIN) + int'(hi != FEAT_MAX);
  endfunction

endpackage
