// tb_fdts_delaunay_detector -- direct-form detector against brute force.
//
// Random detector input vectors r' (plus the eight noiseless points
// themselves) are applied. The expected decision is the brute-force nearest
// neighbour among the eight noiseless vectors of the example channel,
// +1 when the nearest point has x_{k-2} = +1; the expected slicer bits are
// the signs of differences of squared distances. Distances are exact
// integers; inputs equally near to a +1 and a -1 point are not scored.
module tb_fdts_delaunay_detector;
  import fdts_pkg::*;

  localparam int F [3] = '{F0_Q, F1_Q, F2_Q};
  localparam int PI [9] = '{1, 1, 2, 3, 3, 3, 3, 4, 4};
  localparam int PJ [9] = '{5, 6, 6, 5, 6, 7, 8, 6, 8};

  int checks = 0, failures = 0, ties = 0, n_plus = 0, n_minus = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  rp_t        rvec [3];
  logic [8:0] h;
  logic [3:0] cell_hit;
  logic       xhat;

  fdts_delaunay_detector dut (.rvec(rvec), .h(h), .cell_hit(cell_hit), .xhat(xhat));

  longint pts [9][3];   // pts[i] for i = 1..8

  function automatic longint dist2(input int i);
    longint d = 0;
    for (int l = 0; l < 3; l++) d += (longint'(rvec[l]) - pts[i][l]) * (longint'(rvec[l]) - pts[i][l]);
    return d;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (r'=%0d %0d %0d)", what, got, exp,
                                  rvec[0], rvec[1], rvec[2]);
    end
  endtask

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // point i: x_k = bit0, x_{k-1} = bit1, x_{k-2} = bit2 of i-1 (0 -> +1)
    for (int i = 1; i <= 8; i++) begin
      int xk, xk1, xk2;
      xk  = ((i - 1) & 1) != 0 ? -1 : 1;
      xk1 = ((i - 1) & 2) != 0 ? -1 : 1;
      xk2 = ((i - 1) & 4) != 0 ? -1 : 1;
      pts[i][0] = F[0] * xk + F[1] * xk1 + F[2] * xk2;
      pts[i][1] = F[0] * xk1 + F[1] * xk2;
      pts[i][2] = F[0] * xk2;
    end
    for (int n = 0; n < 20000; n++) begin
      longint bp, bm;
      if (n < 8) begin
        for (int l = 0; l < 3; l++) rvec[l] = rp_t'(pts[n+1][l]);
      end else begin
        for (int l = 0; l < 3; l++) rvec[l] = rp_t'($signed($urandom_range(0, 1535)) - 768);
      end
      @(posedge clk);
      bp = dist2(1); bm = dist2(5);
      for (int i = 2; i <= 4; i++) if (dist2(i) < bp) bp = dist2(i);
      for (int i = 6; i <= 8; i++) if (dist2(i) < bm) bm = dist2(i);
      for (int p = 0; p < 9; p++) check($sformatf("h[%0d]", p), int'(h[p]), int'(dist2(PJ[p]) >= dist2(PI[p])));
      if (bp == bm) ties++;
      else begin
        check("xhat", int'(xhat), int'(bp < bm));
        if (bp < bm) n_plus++; else n_minus++;
      end
    end
    $display("decisions +1: %0d, -1: %0d, ties skipped: %0d", n_plus, n_minus, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
