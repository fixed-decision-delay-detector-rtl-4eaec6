// tb_dfe_feedback_filter -- feedback filter B(D) against a direct sum.
//
// A three-tap instance (postcursors f3..f5 of an assumed longer response)
// receives random decisions (+1, -1, and 0 as during start-up) with random
// gaps in en. The expected cancellation sum_m f_{tau+m} xhat_{k-tau-m} is
// computed from the bench's own decision history for every cycle.
module tb_dfe_feedback_filter;
  import fdts_pkg::*;

  localparam int NT = 3;
  localparam int BC [NT] = '{13, -8, 5};

  int checks = 0, failures = 0;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic en;
  sym_t fb_sym;
  rp_t  cancel;
  int   hist [NT];

  dfe_feedback_filter #(.NTAPS(NT), .COEF(BC)) dut (.clk(clk), .rst_n(rst_n), .en(en), .fb_sym(fb_sym), .cancel(cancel));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NT; m++) hist[m] = 0;
    en = 0; fb_sym = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 5000; n++) begin
      int e;
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      case ($urandom_range(0, 4))
        0:       fb_sym = 0;
        1, 2:    fb_sym = 1;
        default: fb_sym = -1;
      endcase
      #1;
      e = 0;
      for (int m = 0; m < NT; m++) e += BC[m] * hist[m];
      checks++;
      if (int'(cancel) != e) begin
        failures++;
        if (failures < 10) $display("FAIL cancel got %0d expected %0d", cancel, e);
      end
      if (en) begin
        for (int m = NT - 1; m > 0; m--) hist[m] = hist[m-1];
        hist[0] = int'(fb_sym);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
