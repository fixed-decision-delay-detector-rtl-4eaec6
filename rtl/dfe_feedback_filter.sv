// dfe_feedback_filter -- ISI-cancelling feedback filter B(D) of FDTS/DF.
//
// The forward filter leaves postcursor ISI f_1 .. f_N. The tree search of
// depth tau uses the first tau of these terms; the feedback filter cancels
// the rest from the past decisions,
//     B(D) = sum_{i=tau+1}^{N} f_i D^(i-tau),
// i.e. at time k it produces sum_{m=1}^{N-tau} f_{tau+m} * xhat_{k-tau-m}.
// The decisions enter as symbols (+1/-1, 0 for "no symbol yet"), so every
// tap is a constant added or subtracted, with no multiplier.
//
// Interface: fb_sym is the decision xhat_{k-tau} made in the current cycle;
// it is shifted into the symbol history when en is high. cancel (Q.FRAC) is
// the ISI estimate for the current sample, formed from the history only, so
// it has no combinational path from fb_sym. NTAPS = N - tau and COEF holds
// f_{tau+1} .. f_N in Q.FRAC. In the worked example N = tau = 2 and the
// filter has no taps; the top then uses one tap of value 0. The defaults
// here, two taps of 0.05 and -0.02, are an illustrative longer response of
// this design's own choosing.
module dfe_feedback_filter
  import fdts_pkg::*;
#(
  parameter int NTAPS        = 2,
  parameter int COEF [NTAPS] = '{13, -5}
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  input  sym_t fb_sym,
  output rp_t  cancel
);

  sym_t hist [NTAPS];

  always_comb begin
    rp_t sum;
    sum = '0;
    for (int m = 0; m < NTAPS; m++) sum += rp_t'(COEF[m] * hist[m]);
    cancel = sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int m = 0; m < NTAPS; m++) hist[m] <= '0;
    end else if (en) begin
      hist[0] <= fb_sym;
      for (int m = 1; m < NTAPS; m++) hist[m] <= hist[m-1];
    end
  end

endmodule
