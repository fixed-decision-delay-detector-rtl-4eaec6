// hyperplane_slicer -- one Voronoi boundary test of the FDTS detector.
//
// For a Delaunay neighbour pair (i, j) the linear discriminant
//     h_ij(r') = sum_l COEF[l] * r'_{k-l} + THETA
// is positive on the side of the boundary hyperplane that is nearer to the
// noiseless point p_i than to p_j. COEF is (p_i - p_j)/2 and THETA is
// -(p_i + p_j).(p_i - p_j)/4, both fixed at elaboration, so the block is a
// (tau+1)-tap FIR filter with constant taps, a threshold adder and a
// two-level slicer, exactly the row FIR_{i,j} -> (+theta) -> slicer of the
// general detector structure.
//
// Interface: rvec[l] is r'_{k-l} in Q.FRAC; value is h_ij in Q.2*FRAC;
// in_half is 1 when r' lies in the closed half-space H_ij (value >= 0).
// Purely combinational. The defaults describe the pair (1,5) of the depth-2
// example channel. Treating the boundary itself as part of H_ij (>= rather
// than >) is this design's choice; ties have probability zero for real data.
module hyperplane_slicer
  import fdts_pkg::*;
#(
  parameter int NTAP        = TAU + 1,
  parameter int COEF [NTAP] = '{F2_Q, F1_Q, F0_Q},
  parameter int THETA       = -(F1_Q * F0_Q + F2_Q * F0_Q + F1_Q * F2_Q)
) (
  input  rp_t  rvec [NTAP],
  output acc_t value,
  output logic in_half
);

  always_comb begin
    acc_t sum;
    sum = acc_t'(THETA);
    for (int l = 0; l < NTAP; l++) begin
      sum += acc_t'(COEF[l]) * acc_t'(rvec[l]);
    end
    value   = sum;
    in_half = (sum >= 0);
  end

endmodule
