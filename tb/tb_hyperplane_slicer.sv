// tb_hyperplane_slicer -- checks one boundary test against plain distances.
//
// Two instances: the default one (pair (1,5) of the depth-2 example) and one
// with the taps and threshold of pair (3,6). For random detector inputs the
// expected discriminant is derived from squared Euclidean distances to the
// two noiseless points: |r-p_j|^2 - |r-p_i|^2 = 4 h_ij, computed here in
// integer arithmetic, so value and in_half are checked exactly.
module tb_hyperplane_slicer;
  import fdts_pkg::*;

  localparam int F0 = F0_Q, F1 = F1_Q, F2 = F2_Q;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rp_t  rvec [3];
  acc_t v15, v36;
  logic b15, b36;

  hyperplane_slicer u15 (.rvec(rvec), .value(v15), .in_half(b15));
  hyperplane_slicer #(
    .NTAP (3),
    .COEF ('{F0 - F1 + F2, F1 - F0, F0}),
    .THETA(0)
  ) u36 (.rvec(rvec), .value(v36), .in_half(b36));

  // noiseless points (Q.FRAC) of tree points 1, 5, 3, 6
  longint p1 [3], p5 [3], p3 [3], p6 [3];

  function automatic longint dist2(input longint p [3], input rp_t r [3]);
    longint d = 0;
    for (int l = 0; l < 3; l++) d += (longint'(r[l]) - p[l]) * (longint'(r[l]) - p[l]);
    return d;
  endfunction

  task automatic check(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // x = (x_k, x_{k-1}, x_{k-2}); point = [f0 x_k + f1 x_{k-1} + f2 x_{k-2}, f0 x_{k-1} + f1 x_{k-2}, f0 x_{k-2}]
    p1 = '{F0 + F1 + F2, F0 + F1, F0};        // (+,+,+)
    p5 = '{F0 + F1 - F2, F0 - F1, -F0};       // (+,+,-)
    p3 = '{F0 - F1 + F2, -F0 + F1, F0};       // (+,-,+)
    p6 = '{-F0 + F1 - F2, F0 - F1, -F0};      // (-,+,-)
    for (int n = 0; n < 3000; n++) begin
      longint e15, e36;
      for (int l = 0; l < 3; l++) rvec[l] = rp_t'($signed($urandom_range(0, 2047)) - 1024);
      if (n == 0) begin rvec[0] = rp_t'(p1[0]); rvec[1] = rp_t'(p1[1]); rvec[2] = rp_t'(p1[2]); end
      @(posedge clk);
      e15 = dist2(p5, rvec) - dist2(p1, rvec);
      e36 = dist2(p6, rvec) - dist2(p3, rvec);
      check("value15 x4", 4 * longint'(v15), e15);
      check("in_half15", longint'(b15), longint'(e15 >= 0));
      check("value36 x4", 4 * longint'(v36), e36);
      check("in_half36", longint'(b36), longint'(e36 >= 0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
