// tb_fdts_feedback_taps -- detector-input delay line against its definition.
//
// Random samples r_k and random decisions are applied, with random gaps in
// en. The bench keeps the raw sample history and the decision history and
// evaluates the defining sums directly,
//   r'_{k-l} = r_{k-l} - sum_{i=tau-l+1}^{tau} f_i xhat_{k-i-l},
// counting decisions before the first real symbol as 0. It checks rvec,
// fb_sym and dec_valid for every accepted sample, for the default depth 2
// and for a depth-3 instance with its own taps.
module tb_fdts_feedback_taps;
  import fdts_pkg::*;

  localparam int F2C [3] = '{F0_Q, F1_Q, F2_Q};
  localparam int F3C [4] = '{256, 77, -40, 19};

  int checks = 0, failures = 0;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic en;
  rp_t  r_in;
  logic xh2, xh3;
  rp_t  rv2 [3];
  rp_t  rv3 [4];
  sym_t fb2, fb3;
  logic dv2, dv3;

  fdts_feedback_taps dut2 (.clk(clk), .rst_n(rst_n), .en(en), .r_in(r_in), .xhat(xh2),
                           .rvec(rv2), .fb_sym(fb2), .dec_valid(dv2));
  fdts_feedback_taps #(.D(3), .F(F3C)) dut3 (.clk(clk), .rst_n(rst_n), .en(en), .r_in(r_in), .xhat(xh3),
                           .rvec(rv3), .fb_sym(fb3), .dec_valid(dv3));

  // histories indexed by sample number k (accepted samples only)
  int rh [0:4095];
  int d2 [-16:4095];   // xhat_j decided by depth-2 loop (0 before the first symbol)
  int d3 [-16:4095];

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int expect_r(input int tau, input int k, input int l);
    int v;
    if (k - l < 0) return 0;
    v = rh[k-l];
    for (int i = tau - l + 1; i <= tau; i++) begin
      if (tau == 2) v -= F2C[i] * d2[k-i-l];
      else          v -= F3C[i] * d3[k-i-l];
    end
    return v;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    for (int j = -16; j < 4096; j++) begin d2[j] = 0; d3[j] = 0; end
    en = 0; r_in = 0; xh2 = 0; xh3 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    k = 0;
    while (k < 4000) begin
      @(negedge clk);
      en   = ($urandom_range(0, 4) != 0);
      r_in = rp_t'($signed($urandom_range(0, 2047)) - 1024);
      xh2  = 1'($urandom);
      xh3  = 1'($urandom);
      #1;
      if (en) begin
        rh[k] = int'(r_in);
        // decision made now is on x_{k-tau}
        if (k >= 2) d2[k-2] = xh2 ? 1 : -1;
        if (k >= 3) d3[k-3] = xh3 ? 1 : -1;
        for (int l = 0; l <= 2; l++) check($sformatf("d2 rvec[%0d]", l), int'(rv2[l]), expect_r(2, k, l));
        for (int l = 0; l <= 3; l++) check($sformatf("d3 rvec[%0d]", l), int'(rv3[l]), expect_r(3, k, l));
        check("dv2", int'(dv2), int'(k >= 2));
        check("dv3", int'(dv3), int'(k >= 3));
        check("fb2", int'(fb2), k >= 2 ? d2[k-2] : 0);
        check("fb3", int'(fb3), k >= 3 ? d3[k-3] : 0);
        k++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
