// fdts_delaunay_detector -- depth-tau FDTS detector in direct form.
//
// The FDTS decision on x_{k-tau} is a nearest-neighbour search among the
// 2^(tau+1) noiseless detector input vectors in (tau+1)-dimensional space:
// decide +1 when r' = [r'_k .. r'_{k-tau}] is nearest to one of the points
// that carry x_{k-tau} = +1. Instead of computing all distances, the space is
// cut only along the boundaries between Delaunay neighbours of opposite
// class that are needed for the binary decision. Each such boundary is one
// hyperplane_slicer (a constant-tap FIR, a threshold and a slicer); the
// slicer bits go to fdts_and_or (AND per +1 cell, then OR).
//
// The noiseless points, and from them every tap and threshold, are computed
// at elaboration from the channel response F and the pair list, so the
// module follows the general structure for any depth. Component l of point
// idx is sum_{m=0}^{tau-l} F[m] * x_{k-l-m}, where x_{k-t} = -1 when bit t of
// idx-1 is set. The pair list itself (the outcome of the Delaunay
// tessellation and the redundancy test) is a parameter, worked out off line.
//
// Interface: rvec[l] = r'_{k-l} (Q.FRAC); h = slicer bits; cell_hit = AND
// outputs; xhat = decision (1 means +1). Purely combinational: the decision
// for x_{k-tau} is ready in the cycle that r'_k is presented. Defaults are
// the depth-2 example channel {1.0, 0.4, -0.1} and its nine pairs.
module fdts_delaunay_detector
  import fdts_pkg::*;
#(
  parameter int D              = TAU,
  parameter int F [D+1]        = '{F0_Q, F1_Q, F2_Q},
  parameter int NPL            = NPLANES,
  parameter int PI_IDX [NPL]   = PAIR_I,
  parameter int PJ_IDX [NPL]   = PAIR_J
) (
  input  rp_t             rvec [D+1],
  output logic [NPL-1:0]  h,
  output logic [2**D-1:0] cell_hit,
  output logic            xhat
);

  typedef int vec_t [D+1];

  // Noiseless detector input vector of tree point idx (1 .. 2^(D+1)).
  function automatic vec_t point(input int idx);
    vec_t p;
    for (int l = 0; l <= D; l++) begin
      p[l] = 0;
      for (int m = 0; m <= D - l; m++) begin
        p[l] += (((idx - 1) >> (l + m)) & 1) != 0 ? -F[m] : F[m];
      end
    end
    return p;
  endfunction

  // Taps (p_i - p_j) / 2 of the discriminant of pair (i, j).
  function automatic vec_t taps(input int i, input int j);
    vec_t pi_v, pj_v, c;
    pi_v = point(i);
    pj_v = point(j);
    for (int l = 0; l <= D; l++) c[l] = (pi_v[l] - pj_v[l]) / 2;
    return c;
  endfunction

  // Threshold -(p_i - p_j).(p_i + p_j) / 4 of pair (i, j), in Q.2*FRAC.
  function automatic int threshold(input int i, input int j);
    vec_t pi_v, pj_v;
    int   t;
    pi_v = point(i);
    pj_v = point(j);
    t = 0;
    for (int l = 0; l <= D; l++) t -= ((pi_v[l] - pj_v[l]) / 2) * ((pi_v[l] + pj_v[l]) / 2);
    return t;
  endfunction

  for (genvar p = 0; p < NPL; p++) begin : g_plane
    localparam vec_t C  = taps(PI_IDX[p], PJ_IDX[p]);
    localparam int   TH = threshold(PI_IDX[p], PJ_IDX[p]);
    hyperplane_slicer #(
      .NTAP (D + 1),
      .COEF (C),
      .THETA(TH)
    ) u_slicer (
      .rvec   (rvec),
      .value  (),
      .in_half(h[p])
    );
  end

  fdts_and_or #(
    .NPL     (NPL),
    .NCELLS  (2 ** D),
    .PAIR_IDX(PI_IDX)
  ) u_and_or (
    .h   (h),
    .cell_hit(cell_hit),
    .xhat(xhat)
  );

endmodule
