// fdts2_reduced_detector -- depth-2 FDTS detector with two multipliers.
//
// For tau = 2 and an equalized response {1, f1, f2} the eight noiseless
// points and their Delaunay tessellation leave nine boundary hyperplanes
// that matter for the decision on x_{k-2}:
//   xhat_{k-2} = +1  iff  r' in (H15 & H16) | H26 | (H35 & H36 & H37 & H38)
//                                | (H46 & H48).
// Written out, every discriminant (scaled by 2/f0 with f0 = 1) is one of four
// tap vectors on (r'_k, r'_{k-1}, r'_{k-2}) plus its own threshold:
//   A = f2 r'_k + f1 r'_{k-1} + r'_{k-2}                 (H15 H26 H37 H48)
//   B = A + r'_k                                        (H16 H38)
//   C = A - f1 r'_k - r'_{k-1}                          (H35 H46)
//   E = B - f1 r'_k - r'_{k-1}                          (H36)
//   thresholds: H15 -(f1+f2+f1f2), H16 -(2f1+f1f2), H26 -(f1-f2+f1f2),
//               H35 +(f1-f2), H36 0, H37 +(f1-f2+f1f2), H38 +(2f1+f1f2),
//               H46 -(f1-f2), H48 +(f1+f2+f1f2).
// Only f1 r'_k and f2 r'_k are true products. f1 r'_{k-1} is the product
// f1 r'_k of the previous cycle, held in a register; because the internal
// feedback loop turns r'_k into r'_{k-1} = r'_k - f2 xhat_{k-2}, that
// register is corrected by the constant f1 f2 xhat_{k-2} when it is loaded.
// Thresholds are constants worked out at elaboration from F1 and F2.
//
// Interface: r0, r1, r2 = r'_k, r'_{k-1}, r'_{k-2} (Q.FRAC), from
// fdts_feedback_taps; fb_sym = the decision of this cycle as fed back (+1/-1,
// 0 during start-up), used to load the product register on en. Outputs h
// (slicer bits, in the order 15 16 26 35 36 37 38 46 48), cell_hit (AND
// outputs of points 1..4) and xhat (1 means +1) are combinational: the
// decision for x_{k-2} is ready in the cycle r'_k is presented. The
// structure (two multipliers, one extra delay, nine adders, slicers, three
// ANDs and an OR) follows the depth-2 example; the fixed-point format, the
// slicer's treatment of ties (h >= 0 counts as inside) and the start-up rule
// are this design's choices.
module fdts2_reduced_detector
  import fdts_pkg::*;
#(
  parameter int F1 = F1_Q,
  parameter int F2 = F2_Q
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  rp_t        r0,
  input  rp_t        r1,
  input  rp_t        r2,
  input  sym_t       fb_sym,
  output logic [8:0] h,
  output logic [3:0] cell_hit,
  output logic       xhat
);

  localparam int ONE = 1 << FRAC;          // f0 = 1.0
  localparam int P12 = F1 * F2;            // f1 f2 in Q.2*FRAC
  localparam int T15 = -(F1 * ONE + F2 * ONE + P12);
  localparam int T16 = -(2 * F1 * ONE + P12);
  localparam int T26 = -(F1 * ONE - F2 * ONE + P12);
  localparam int T35 = F1 * ONE - F2 * ONE;
  localparam int T36 = 0;
  localparam int T37 = F1 * ONE - F2 * ONE + P12;
  localparam int T38 = 2 * F1 * ONE + P12;
  localparam int T46 = -(F1 * ONE - F2 * ONE);
  localparam int T48 = F1 * ONE + F2 * ONE + P12;

  acc_t m1, m2, m1d;                       // f1 r'_k, f2 r'_k, f1 r'_{k-1}
  acc_t s0, s1, s2;                        // r'_k, r'_{k-1}, r'_{k-2} in Q.2*FRAC
  acc_t sum_a, sum_b, sum_c, sum_e;
  acc_t hv [9];

  assign m1 = acc_t'(F1) * acc_t'(r0);
  assign m2 = acc_t'(F2) * acc_t'(r0);
  assign s0 = acc_t'(r0) <<< FRAC;
  assign s1 = acc_t'(r1) <<< FRAC;
  assign s2 = acc_t'(r2) <<< FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  m1d <= '0;
    else if (en) m1d <= m1 - acc_t'(P12 * fb_sym);
  end

  always_comb begin
    sum_a = m2 + m1d + s2;
    sum_b = sum_a + s0;
    sum_c = sum_a - m1 - s1;
    sum_e = sum_b - m1 - s1;
    hv[0] = sum_a + acc_t'(T15);
    hv[1] = sum_b + acc_t'(T16);
    hv[2] = sum_a + acc_t'(T26);
    hv[3] = sum_c + acc_t'(T35);
    hv[4] = sum_e + acc_t'(T36);
    hv[5] = sum_a + acc_t'(T37);
    hv[6] = sum_b + acc_t'(T38);
    hv[7] = sum_c + acc_t'(T46);
    hv[8] = sum_a + acc_t'(T48);
    for (int p = 0; p < 9; p++) h[p] = (hv[p] >= 0);
  end

  fdts_and_or #(
    .NPL     (9),
    .NCELLS  (4),
    .PAIR_IDX('{1, 1, 2, 3, 3, 3, 3, 4, 4})
  ) u_and_or (
    .h       (h),
    .cell_hit(cell_hit),
    .xhat    (xhat)
  );

endmodule
