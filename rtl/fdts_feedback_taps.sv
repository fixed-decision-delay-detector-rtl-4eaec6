// fdts_feedback_taps -- internal feedback loop that forms the detector input.
//
// The FDTS decision on x_{k-tau} compares the last tau+1 detector samples
// with the noiseless tree points. Those samples still contain postcursor ISI
// from symbols that are already decided (x_{k-tau-1} and older). This block
// removes it, so that the detector sees
//     r'_{k-l} = r_{k-l} - sum_{i=tau-l+1}^{tau} f_i * xhat_{k-i-l},  l = 1..tau,
//     r'_k     = r_k,
// which no longer depends on past decisions; the noiseless points then are
// fixed constants. The vector is kept in a delay line (the D elements of the
// depth-2 implementation). Going one step along the line removes one more
// term, always that of the decision made in the current cycle:
//     stage_{l+1} <= stage_l - F[tau-l] * xhat_{k-tau},   stage_0 = r_k,
// so each stage needs only a constant add/subtract, no multiplier.
//
// Start-up: before tau samples have entered there is no real symbol to
// decide. dec_valid is 0 for those samples and the symbol fed back (fb_sym)
// is 0, i.e. the channel is taken to have been idle before the first symbol.
// This start-up rule is this design's choice.
//
// Interface: en accepts r_in = r_k; rvec[l] = r'_{k-l} is valid in the same
// cycle (rvec[0] is r_in itself); xhat is the detector's decision for that
// vector, returned combinationally; fb_sym is that decision as +1/-1 (0 while
// dec_valid is 0) for the other feedback users. Registers update on en.
module fdts_feedback_taps
  import fdts_pkg::*;
#(
  parameter int D       = TAU,
  parameter int F [D+1] = '{F0_Q, F1_Q, F2_Q}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  rp_t  r_in,
  input  logic xhat,
  output rp_t  rvec [D+1],
  output sym_t fb_sym,
  output logic dec_valid
);

  localparam int CW = $clog2(D + 1);

  rp_t           stage [D];
  logic [CW-1:0] warm;

  always_comb begin
    rvec[0] = r_in;
    for (int l = 1; l <= D; l++) rvec[l] = stage[l-1];
  end

  assign dec_valid = (warm == CW'(D));
  assign fb_sym    = dec_valid ? bit_to_sym(xhat) : sym_t'(0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      warm <= '0;
      for (int l = 0; l < D; l++) stage[l] <= '0;
    end else if (en) begin
      if (!dec_valid) warm <= warm + 1'b1;
      stage[0] <= r_in - rp_t'(F[D] * fb_sym);
      for (int l = 1; l < D; l++) stage[l] <= stage[l-1] - rp_t'(F[D-l] * fb_sym);
    end
  end

endmodule
