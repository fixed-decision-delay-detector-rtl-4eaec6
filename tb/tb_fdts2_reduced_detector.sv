// tb_fdts2_reduced_detector -- two-multiplier detector against brute force.
//
// The detector holds f1 r'_{k-1} in a register, so it must see the vector
// sequence that the internal feedback loop produces. This bench forms that
// sequence itself from random samples r_k and the detector's own decisions:
//   r'_{k-1} <- r_k - f2 xhat,  r'_{k-2} <- r'_{k-1} - f1 xhat,
// with xhat fed back as 0 for the first two samples (start-up), and with
// random gaps in en. Each decision and slicer bit is compared with the
// brute-force nearest-neighbour answer over the eight noiseless points,
// in exact integer arithmetic (ties are not scored).
module tb_fdts2_reduced_detector;
  import fdts_pkg::*;

  localparam int F0 = F0_Q, F1 = F1_Q, F2 = F2_Q;
  localparam int PI [9] = '{1, 1, 2, 3, 3, 3, 3, 4, 4};
  localparam int PJ [9] = '{5, 6, 6, 5, 6, 7, 8, 6, 8};

  int checks = 0, failures = 0, ties = 0, stalls = 0;
  int cells_seen [4];
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic       en;
  rp_t        r0, r1, r2;
  sym_t       fb_sym;
  logic [8:0] h;
  logic [3:0] cell_hit;
  logic       xhat;

  fdts2_reduced_detector dut (.clk(clk), .rst_n(rst_n), .en(en), .r0(r0), .r1(r1), .r2(r2),
                              .fb_sym(fb_sym), .h(h), .cell_hit(cell_hit), .xhat(xhat));

  longint pts [9][3];

  function automatic longint dist2(input int i);
    return (longint'(r0) - pts[i][0]) ** 2 + (longint'(r1) - pts[i][1]) ** 2 + (longint'(r2) - pts[i][2]) ** 2;
  endfunction

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d (r'=%0d %0d %0d)", what, got, exp, r0, r1, r2);
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
    int nsamp;
    for (int i = 1; i <= 8; i++) begin
      int xk, xk1, xk2;
      xk  = ((i - 1) & 1) != 0 ? -1 : 1;
      xk1 = ((i - 1) & 2) != 0 ? -1 : 1;
      xk2 = ((i - 1) & 4) != 0 ? -1 : 1;
      pts[i][0] = F0 * xk + F1 * xk1 + F2 * xk2;
      pts[i][1] = F0 * xk1 + F1 * xk2;
      pts[i][2] = F0 * xk2;
    end
    foreach (cells_seen[c]) cells_seen[c] = 0;
    en = 0; r0 = 0; r1 = 0; r2 = 0; fb_sym = 0;
    nsamp = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      en = ($urandom_range(0, 7) != 0);
      if (!en) stalls++;
      r0 = rp_t'($signed($urandom_range(0, 1535)) - 768);
      #1;
      fb_sym = (nsamp >= 2) ? bit_to_sym(xhat) : sym_t'(0);
      #1;
      if (en) begin
        longint bp, bm;
        bp = dist2(1); bm = dist2(5);
        for (int i = 2; i <= 4; i++) if (dist2(i) < bp) bp = dist2(i);
        for (int i = 6; i <= 8; i++) if (dist2(i) < bm) bm = dist2(i);
        for (int p = 0; p < 9; p++) check($sformatf("h[%0d]", p), int'(h[p]), int'(dist2(PJ[p]) >= dist2(PI[p])));
        if (bp == bm) ties++;
        else check("xhat", int'(xhat), int'(bp < bm));
        for (int c = 0; c < 4; c++) if (cell_hit[c]) cells_seen[c]++;
      end
      @(posedge clk);
      if (en) begin
        #1;
        r2 = r1 - rp_t'(F1 * fb_sym);
        r1 = r0 - rp_t'(F2 * fb_sym);
        nsamp++;
      end
    end
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (cells_seen[c] == 0) begin failures++; $display("cell %0d never hit", c + 1); end
    end
    checks++;
    if (stalls == 0) failures++;
    $display("cells hit: %0d %0d %0d %0d, stalls %0d, ties %0d", cells_seen[0], cells_seen[1], cells_seen[2],
             cells_seen[3], stalls, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
