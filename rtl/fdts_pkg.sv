// fdts_pkg -- shared number formats and constants of the FDTS/DF receiver.
//
// All signal values are two's-complement fixed point with FRAC fractional
// bits. A received sample (sample_t) is Q4.8 in 12 bits; the detector input
// r' (rp_t) keeps one more integer bit because the internal feedback loop
// subtracts decided postcursor terms from it. Channel and filter
// coefficients (coef_t) are Q1.8. Products of a sample and a coefficient
// are kept exactly in 2*FRAC fractional bits (acc_t), so the hyperplane
// tests are computed without rounding.
//
// A decided symbol travels on the feedback paths as sym_t, a two-bit signed
// value in {-1, 0, +1}; 0 stands for "no symbol yet" during the first
// samples after reset, when the channel is taken to have been idle.
//
// The channel coefficients are those of the worked example, the equalized
// response {1.0, 0.4, -0.1}, rounded to FRAC bits: 256, 102, -26. The
// Delaunay neighbour pairs of that example (its Table 1) are the nine
// (i, j) pairs below, point indices following the look-ahead tree: index i-1
// read as a binary number has bit t set when x_{k-t} = -1, so points 1..4
// carry x_{k-tau} = +1 and points 5..8 carry x_{k-tau} = -1.
package fdts_pkg;

  localparam int unsigned FRAC     = 8;
  localparam int unsigned SAMPLE_W = 12;
  localparam int unsigned RP_W     = SAMPLE_W + 1;
  localparam int unsigned COEF_W   = 10;
  localparam int unsigned ACC_W    = 28;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [RP_W-1:0]     rp_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic signed [1:0]          sym_t;

  // Tree depth of the example detector and its equalized channel response.
  localparam int TAU     = 2;
  localparam int F0_Q    = 256;   // 1.0
  localparam int F1_Q    = 102;   // 0.4  -> 0.3984
  localparam int F2_Q    = -26;   // -0.1 -> -0.1016
  localparam int NPLANES = 9;

  // Delaunay neighbour pairs (i, j) kept for the binary decision.
  localparam int PAIR_I [NPLANES] = '{1, 1, 2, 3, 3, 3, 3, 4, 4};
  localparam int PAIR_J [NPLANES] = '{5, 6, 6, 5, 6, 7, 8, 6, 8};

  // Symbol on the feedback paths for a decision bit (1 means +1).
  function automatic sym_t bit_to_sym(input logic b);
    return b ? sym_t'(2'sd1) : sym_t'(-2'sd1);
  endfunction

endpackage
