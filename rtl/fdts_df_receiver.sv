// fdts_df_receiver -- fixed-delay tree-search receiver with decision feedback.
//
// Receiver chain for a binary ISI channel, one sample per clock:
//   y_k -> forward filter C(D) -> q_k -> (-) B(D) feedback -> r_k
//       -> internal feedback delay line -> r' = [r'_k, r'_{k-1}, r'_{k-2}]
//       -> depth-2 Delaunay detector -> xhat_{k-2}
// The forward filter leaves the equalized response F(D) = {1.0, f1, f2}; the
// feedback filter B(D) cancels postcursor terms beyond f2 (none for the
// three-tap example response); the delay line removes the part of f1, f2
// that belongs to already decided symbols; the detector decides x_{k-2} by
// nine hyperplane tests, AND and OR, which equals the nearest-neighbour
// decision over the eight noiseless vectors. The same r' also feeds the
// general direct-form detector (one constant-tap FIR per hyperplane); its
// decision comes out on xhat_direct and is asserted to equal xhat, so the
// two forms check each other on every sample.
//
// Interface: in_valid/y_in (Q4.8) is the equalizer input, one sample when
// in_valid is high; c_coef are the forward-filter taps (Q1.8). xhat_valid
// pulses with xhat (1 means +1) for each symbol in order. Timing: the sample
// y_k passes the forward filter register, and the decision on x_{k-2} is
// made in the following cycle and registered, so the decision on x_j leaves
// two cycles after y_{j+2} was accepted (TAU + 2 cycles after y_j when
// in_valid is held high). The first TAU samples after reset yield no
// decision. Gaps in in_valid stall the whole chain.
//
// Following the example design: depth 2, response {1.0, 0.4, -0.1}, the nine
// hyperplanes and the two-multiplier structure. This design's own choices:
// fixed-point widths, the forward-filter length, the start-up rule and the
// valid-strobe interface.
module fdts_df_receiver
  import fdts_pkg::*;
#(
  parameter int NC          = 4,
  parameter int NB          = 1,
  parameter int B_COEF [NB] = '{0}
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t y_in,
  input  coef_t   c_coef [NC],
  output logic    xhat_valid,
  output logic    xhat,
  output logic    xhat_direct
);

  localparam int F [TAU+1] = '{F0_Q, F1_Q, F2_Q};

  logic    q_valid;
  sample_t q;
  rp_t     cancel;
  rp_t     r;
  rp_t     rvec [TAU+1];
  sym_t    fb_sym;
  logic    dec_valid;
  logic    xhat_now;
  logic    xhat_dir;
  logic [NPLANES-1:0] h_red, h_dir;
  logic [3:0]         cell_red, cell_dir;

  forward_filter #(.NTAPS(NC)) u_cfilt (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (in_valid),
    .y_in     (y_in),
    .coef     (c_coef),
    .out_valid(q_valid),
    .q_out    (q)
  );

  dfe_feedback_filter #(.NTAPS(NB), .COEF(B_COEF)) u_bfilt (
    .clk   (clk),
    .rst_n (rst_n),
    .en    (q_valid),
    .fb_sym(fb_sym),
    .cancel(cancel)
  );

  assign r = rp_t'(q) - cancel;

  fdts_feedback_taps #(.D(TAU), .F(F)) u_taps (
    .clk      (clk),
    .rst_n    (rst_n),
    .en       (q_valid),
    .r_in     (r),
    .xhat     (xhat_now),
    .rvec     (rvec),
    .fb_sym   (fb_sym),
    .dec_valid(dec_valid)
  );

  fdts2_reduced_detector #(.F1(F1_Q), .F2(F2_Q)) u_det (
    .clk     (clk),
    .rst_n   (rst_n),
    .en      (q_valid),
    .r0      (rvec[0]),
    .r1      (rvec[1]),
    .r2      (rvec[2]),
    .fb_sym  (fb_sym),
    .h       (h_red),
    .cell_hit(cell_red),
    .xhat    (xhat_now)
  );

  fdts_delaunay_detector #(.D(TAU), .F(F)) u_direct (
    .rvec    (rvec),
    .h       (h_dir),
    .cell_hit(cell_dir),
    .xhat    (xhat_dir)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xhat_valid  <= 1'b0;
      xhat        <= 1'b0;
      xhat_direct <= 1'b0;
    end else begin
      xhat_valid <= q_valid & dec_valid;
      if (q_valid & dec_valid) begin
        xhat        <= xhat_now;
        xhat_direct <= xhat_dir;
      end
    end
  end

  // The two-multiplier detector and the direct form make the same tests.
  a_forms_agree: assert property (@(posedge clk) disable iff (!rst_n)
    q_valid |-> (h_red == h_dir) && (cell_red == cell_dir) && (xhat_now == xhat_dir));

endmodule
