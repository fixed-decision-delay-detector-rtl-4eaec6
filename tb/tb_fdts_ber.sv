// tb_fdts_ber -- bit-error-rate comparison of FDTS (depth 2) and plain DFE.
//
// The receiver at its default size is fed the equalized example channel
// F(D) = 1.0 + 0.4 D - 0.1 D^2 with additive white Gaussian noise (forward
// filter programmed as a pass-through, C(D) = 1), at several signal-to-noise
// ratios, defined here as SNR = 10 log10(1 / sigma^2) for unit-energy
// symbols. On the same quantized samples the bench runs a conventional
// decision-feedback equalizer (zero decision delay: cancel f1, f2 with past
// decisions, then slice) as the baseline. Checked: the depth-2 detector makes
// no more errors than the DFE at every SNR where the DFE makes at least 100
// (below that the counts are too small to compare), strictly fewer over the
// whole run, errors fall as the SNR rises, the direct-form output always equals
// the two-multiplier output, and every symbol gets a decision.
module tb_fdts_ber;
  import fdts_pkg::*;

  localparam int  NPT = 5;
  localparam real SNR_DB [NPT] = '{6.0, 8.0, 10.0, 11.0, 12.0};
  localparam int  NPER = 400000;
  localparam int  NSYM = NPT * NPER;

  int checks = 0, failures = 0;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid;
  sample_t y_in;
  coef_t   c_coef [4];
  logic    xhat_valid, xhat, xhat_direct;

  fdts_df_receiver dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y_in(y_in), .c_coef(c_coef),
                        .xhat_valid(xhat_valid), .xhat(xhat), .xhat_direct(xhat_direct));

  int xs  [NSYM];
  int yq  [NSYM];
  int dfe [-2:NSYM];
  int err_fdts [NPT];
  int err_dfe  [NPT];
  int n_out = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    #200000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int tot_f, tot_d;
    for (int p = 0; p < NPT; p++) begin err_fdts[p] = 0; err_dfe[p] = 0; end
    dfe[-2] = 0; dfe[-1] = 0;
    for (int j = 0; j < NSYM; j++) begin
      real s, sigma;
      int  v, z;
      sigma = $pow(10.0, -SNR_DB[j / NPER] / 20.0);
      xs[j] = ($urandom & 1) != 0 ? 1 : -1;
      s = xs[j] + (j >= 1 ? 0.4 * xs[j-1] : 0.0) + (j >= 2 ? -0.1 * xs[j-2] : 0.0) + sigma * gauss();
      v = int'($floor(s * 256.0 + 0.5));
      if (v > 2047) v = 2047;
      if (v < -2048) v = -2048;
      yq[j] = v;
      // baseline DFE on the same samples
      z = yq[j] - F1_Q * dfe[j-1] - F2_Q * dfe[j-2];
      dfe[j] = (z >= 0) ? 1 : -1;
      if (dfe[j] != xs[j]) err_dfe[j / NPER]++;
    end
    c_coef = '{coef_t'(256), coef_t'(0), coef_t'(0), coef_t'(0)};
    in_valid = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 0; j < NSYM; j++) begin
      in_valid = 1;
      y_in = sample_t'(yq[j]);
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);

    checks++;
    if (n_out != NSYM - TAU) begin failures++; $display("FAIL %0d decisions", n_out); end
    tot_f = 0; tot_d = 0;
    for (int p = 0; p < NPT; p++) begin
      $display("SNR %4.1f dB: FDTS %0d errors (BER %e), DFE %0d errors (BER %e) in %0d symbols",
               SNR_DB[p], err_fdts[p], real'(err_fdts[p]) / NPER, err_dfe[p], real'(err_dfe[p]) / NPER, NPER);
      if (err_dfe[p] >= 100) begin
        checks++;
        if (err_fdts[p] > err_dfe[p]) begin failures++; $display("FAIL FDTS worse than DFE"); end
      end
      if (p > 0 && err_fdts[p-1] >= 100) begin
        checks++;
        if (err_fdts[p] > err_fdts[p-1]) begin failures++; $display("FAIL errors did not fall with SNR"); end
      end
      tot_f += err_fdts[p];
      tot_d += err_dfe[p];
    end
    checks++;
    if (!(tot_f < tot_d)) begin failures++; $display("FAIL no gain over DFE"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && xhat_valid) begin
      checks++;
      if (xhat_direct != xhat) failures++;
      if ((xhat ? 1 : -1) != xs[n_out]) err_fdts[n_out / NPER]++;
      n_out++;
    end
  end
endmodule
