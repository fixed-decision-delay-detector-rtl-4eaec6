// tb_forward_filter -- forward equalizer FIR against a reference convolution.
//
// Random taps (changed every 500 samples) and random input samples, with
// random gaps in in_valid. The expected output is the convolution of the
// accepted samples with the taps, rounded half up to Q.FRAC and saturated,
// and it must appear exactly one cycle after the sample, with out_valid.
// Large inputs and taps are mixed in so that saturation occurs.
module tb_forward_filter;
  import fdts_pkg::*;

  localparam int NT = 4;

  int checks = 0, failures = 0, sat_hits = 0;
  logic clk = 0;
  logic rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid, out_valid;
  sample_t y_in, q_out;
  coef_t   coef [NT];
  int      yh [NT];

  forward_filter dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .y_in(y_in), .coef(coef),
                      .out_valid(out_valid), .q_out(q_out));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int m = 0; m < NT; m++) begin yh[m] = 0; coef[m] = 0; end
    in_valid = 0; y_in = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 8000; n++) begin
      int     e;
      longint acc;
      logic   v;
      @(negedge clk);
      if (n % 500 == 0)
        for (int m = 0; m < NT; m++) coef[m] = coef_t'($signed($urandom_range(0, 767)) - 384);
      in_valid = ($urandom_range(0, 3) != 0);
      y_in = ($urandom_range(0, 9) == 0) ? sample_t'($urandom) : sample_t'($signed($urandom_range(0, 1023)) - 512);
      v = in_valid;
      if (v) begin
        for (int m = NT - 1; m > 0; m--) yh[m] = yh[m-1];
        yh[0] = int'(y_in);
      end
      acc = 0;
      for (int m = 0; m < NT; m++) acc += longint'(coef[m]) * yh[m];
      acc = (acc + 128) >>> 8;
      if (acc > 2047) begin acc = 2047; sat_hits++; end
      if (acc < -2048) begin acc = -2048; sat_hits++; end
      e = int'(acc);
      @(posedge clk);
      #1;
      check("out_valid", int'(out_valid), int'(v));
      if (v) check("q_out", int'(q_out), e);
      // the coefficients must stay put until the output is checked
    end
    checks++;
    if (sat_hits == 0) begin failures++; $display("saturation never exercised"); end
    $display("saturated outputs: %0d", sat_hits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
