// tb_fdts_df_receiver -- end-to-end run of the receiver at its default size.
//
// A random +1/-1 symbol stream goes through a bench model of the channel,
//   y_k = 2 (s_k + n_k) - 0.5 y_{k-1},  s_k = x_k + 0.4 x_{k-1} - 0.1 x_{k-2},
// i.e. H(D) = 2 F(D) / (1 + 0.5 D), and the forward filter is programmed
// with C(D) = 0.5 + 0.25 D so that H(D) C(D) = F(D). The first 1500 symbols
// are noise free, the rest carry Gaussian noise. in_valid is held high for
// the first samples (to measure the latency) and then has random gaps.
//
// Reference model, written independently of the RTL structure: the
// forward-filter output is recomputed from the quantized samples; the
// detector input vector is formed from the sample history and the earlier
// decisions by the defining sums; the decision is the nearest of the eight
// noiseless points by squared distance. Scored: every decision against the
// model (and the direct-form output against the two-multiplier one), the
// noise-free part against the transmitted symbols, the number of decisions,
// and the latency TAU + 2 cycles. Each mechanism must occur at least once:
// start-up without decisions, stalls, decisions of both signs, a +1 decision
// from each of the four +1 Voronoi cells (each AND gate), and nonzero
// decision feedback in the delay line.
module tb_fdts_df_receiver;
  import fdts_pkg::*;

  localparam int    NSYM   = 6000;
  localparam int    NCLEAN = 1500;
  localparam real   SIGMA  = 0.35;
  localparam real   FR [3] = '{1.0, 0.4, -0.1};
  localparam int    FQ [3] = '{F0_Q, F1_Q, F2_Q};

  int checks = 0, failures = 0;
  int n_stall = 0, n_plus = 0, n_minus = 0, n_fb = 0, n_ties = 0, n_err_noisy = 0;
  int n_cell [4];
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid;
  sample_t y_in;
  coef_t   c_coef [4];
  logic    xhat_valid, xhat, xhat_direct;

  fdts_df_receiver dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y_in(y_in), .c_coef(c_coef),
                        .xhat_valid(xhat_valid), .xhat(xhat), .xhat_direct(xhat_direct));

  int  xs  [NSYM];          // transmitted symbols
  int  yq  [NSYM];          // quantized channel samples
  int  rq  [NSYM];          // forward-filter output (reference)
  int  dec [-4:NSYM];       // decisions, 0 before the first symbol
  longint pts [9][3];
  int  n_out = 0;
  longint cyc = 0, first_in = -1, first_out = -1;

  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus: channel model and forward-filter reference
  initial begin
    real yprev;
    for (int i = 1; i <= 8; i++) begin
      int a, b, c;
      a = ((i - 1) & 1) != 0 ? -1 : 1;
      b = ((i - 1) & 2) != 0 ? -1 : 1;
      c = ((i - 1) & 4) != 0 ? -1 : 1;
      pts[i][0] = FQ[0] * a + FQ[1] * b + FQ[2] * c;
      pts[i][1] = FQ[0] * b + FQ[1] * c;
      pts[i][2] = FQ[0] * c;
    end
    for (int j = -4; j <= NSYM; j++) dec[j] = 0;
    foreach (n_cell[c]) n_cell[c] = 0;
    yprev = 0.0;
    for (int j = 0; j < NSYM; j++) begin
      real s, y;
      int  v;
      longint acc;
      xs[j] = ($urandom & 1) != 0 ? 1 : -1;
      s = 0.0;
      for (int i = 0; i < 3; i++) if (j - i >= 0) s += FR[i] * xs[j-i];
      if (j >= NCLEAN) s += SIGMA * gauss();
      y = 2.0 * s - 0.5 * yprev;
      yprev = y;
      v = int'($floor(y * 256.0 + 0.5));
      if (v > 2047) v = 2047;
      if (v < -2048) v = -2048;
      yq[j] = v;
      acc = 128 * longint'(yq[j]) + (j > 0 ? 64 * longint'(yq[j-1]) : 0);
      acc = (acc + 128) >>> 8;
      if (acc > 2047) acc = 2047;
      if (acc < -2048) acc = -2048;
      rq[j] = int'(acc);
    end
    c_coef = '{coef_t'(128), coef_t'(64), coef_t'(0), coef_t'(0)};
    in_valid = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int j = 0; j < NSYM; j++) begin
      if (j > 40) begin
        while ($urandom_range(0, 5) == 0) begin
          in_valid = 0;
          n_stall++;
          @(negedge clk);
        end
      end
      in_valid = 1;
      y_in = sample_t'(yq[j]);
      if (j == 0) first_in = cyc;
      @(negedge clk);
    end
    in_valid = 0;
    repeat (10) @(negedge clk);

    check("number of decisions", n_out, NSYM - TAU);
    check("latency in cycles", int'(first_out - first_in), TAU + 2);
    checks++; if (n_stall == 0) begin failures++; $display("no stall happened"); end
    checks++; if (n_plus == 0 || n_minus == 0) begin failures++; $display("one decision value never seen"); end
    checks++; if (n_fb == 0) begin failures++; $display("decision feedback never active"); end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (n_cell[c] == 0) begin failures++; $display("cell %0d never hit", c + 1); end
    end
    $display("decisions %0d (+1: %0d, -1: %0d), stalls %0d, ties %0d, cells %0d %0d %0d %0d",
             n_out, n_plus, n_minus, n_stall, n_ties, n_cell[0], n_cell[1], n_cell[2], n_cell[3]);
    $display("noisy part: %0d symbol errors in %0d symbols (sigma %0.2f)", n_err_noisy, NSYM - NCLEAN - TAU, SIGMA);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // scoring of each decision
  always @(posedge clk) begin
    if (rst_n && xhat_valid) begin
      int  j, bpi;
      longint r0, r1, r2, bp, bm;
      j = n_out;
      if (first_out < 0) first_out = cyc;
      r0 = rq[j+2];
      r1 = rq[j+1] - FQ[2] * dec[j-1];
      r2 = rq[j]   - FQ[1] * dec[j-1] - FQ[2] * dec[j-2];
      bp = -1; bm = -1; bpi = 0;
      for (int i = 1; i <= 8; i++) begin
        longint d;
        d = (r0 - pts[i][0]) ** 2 + (r1 - pts[i][1]) ** 2 + (r2 - pts[i][2]) ** 2;
        if (i <= 4) begin if (bp < 0 || d < bp) begin bp = d; bpi = i; end end
        else        begin if (bm < 0 || d < bm) bm = d; end
      end
      if (bp < bm) n_cell[bpi-1]++;
      if (dec[j-1] != 0) n_fb++;
      check("xhat_direct equals xhat", int'(xhat_direct), int'(xhat));
      if (bp == bm) n_ties++;
      else check($sformatf("decision %0d against model", j), int'(xhat), int'(bp < bm));
      dec[j] = xhat ? 1 : -1;
      if (xhat) n_plus++; else n_minus++;
      if (j < NCLEAN - TAU) check($sformatf("noise-free decision %0d", j), dec[j], xs[j]);
      else if (dec[j] != xs[j]) n_err_noisy++;
      n_out++;
    end
  end
endmodule
