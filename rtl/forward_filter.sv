// forward_filter -- forward equalizer C(D) of the FDTS/DF receiver.
//
// The forward filter shapes the sampled channel response H(D) into the
// equalized response F(D) = H(D)C(D): it suppresses the precursor ISI and
// leaves the postcursor terms for the detector and the feedback filter. The
// tap values follow from the channel, which is not fixed here, so they are
// run-time inputs. This is a plain direct-form FIR filter:
//     q_k = sum_{m=0}^{NTAPS-1} coef[m] * y_{k-m},
// rounded (half up) from Q.2*FRAC to Q.FRAC and saturated to sample_t. The
// number of taps, the rounding and the saturation are this design's choices.
//
// Interface: in_valid accepts y_in = y_k; one cycle later out_valid is high
// with q_out = q_k. The input history advances only on in_valid. Reset
// clears the history (the channel is idle before the first sample).
module forward_filter
  import fdts_pkg::*;
#(
  parameter int NTAPS = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  sample_t y_in,
  input  coef_t   coef [NTAPS],
  output logic    out_valid,
  output sample_t q_out
);

  localparam acc_t QMAX = acc_t'((1 <<< (SAMPLE_W - 1)) - 1);
  localparam acc_t QMIN = -acc_t'(1 <<< (SAMPLE_W - 1));

  sample_t hist [NTAPS-1];
  acc_t    acc;
  acc_t    rounded;
  sample_t q_next;

  always_comb begin
    acc = acc_t'(coef[0]) * acc_t'(y_in);
    for (int m = 1; m < NTAPS; m++) acc += acc_t'(coef[m]) * acc_t'(hist[m-1]);
    rounded = (acc + acc_t'(1 <<< (FRAC - 1))) >>> FRAC;
    if (rounded > QMAX)      q_next = sample_t'(QMAX);
    else if (rounded < QMIN) q_next = sample_t'(QMIN);
    else                     q_next = sample_t'(rounded);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      q_out     <= '0;
      for (int m = 0; m < NTAPS - 1; m++) hist[m] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        q_out   <= q_next;
        hist[0] <= y_in;
        for (int m = 1; m < NTAPS - 1; m++) hist[m] <= hist[m-1];
      end
    end
  end

endmodule
