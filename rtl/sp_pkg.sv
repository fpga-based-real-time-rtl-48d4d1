// sp_pkg: widths, types and default sizes shared by the streaming signal
// processing chain (input FIFO, pre-processing filter, BRAM, MAC lanes,
// controller and output storage).
//
// The 16-bit sample width is the design's stated input width. Coefficient
// width (16-bit, Q1.15), accumulator width (40 bits, room for 2^8 full-scale
// products), the result scaling and the default number of taps and lanes are
// this implementation's own choices.
package sp_pkg;

  // Sample and coefficient formats
  localparam int unsigned DATA_W = 16;   // input/output sample width
  localparam int unsigned COEF_W = 16;   // signed Q1.15 coefficients
  localparam int unsigned PROD_W = DATA_W + COEF_W;
  localparam int unsigned ACC_W  = 40;   // accumulator guard bits
  localparam int unsigned FRAC_W = 15;   // result = acc >>> FRAC_W, saturated

  // Default array sizes
  localparam int unsigned DEF_NUM_TAPS = 8; // coefficients per output sample
  localparam int unsigned DEF_NUM_PE   = 8; // parallel MAC lanes

  typedef logic signed [DATA_W-1:0] sample_t;
  typedef logic signed [COEF_W-1:0] coef_t;
  typedef logic signed [PROD_W-1:0] prod_t;
  typedef logic signed [ACC_W-1:0]  acc_t;

  // Pre-processing modes
  typedef enum logic {
    PRE_BYPASS = 1'b0,   // pass samples through (one register)
    PRE_AVG    = 1'b1    // moving-average low-pass filter
  } pre_mode_e;

  // Arithmetic shift then saturate an accumulator to a sample.
  function automatic sample_t scale_sat(acc_t acc, int unsigned shift);
    acc_t s;
    acc_t max_v;
    acc_t min_v;
    s     = acc >>> shift;
    max_v = acc_t'((longint'(1) <<< (DATA_W-1)) - 1);
    min_v = -acc_t'(longint'(1) <<< (DATA_W-1));
    if (s > max_v)      return sample_t'(max_v);
    else if (s < min_v) return sample_t'(min_v);
    else                return sample_t'(s);
  endfunction

endpackage
