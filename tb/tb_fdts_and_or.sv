// tb_fdts_and_or -- exhaustive check of the AND/OR decision logic.
//
// All 512 combinations of the nine slicer bits of the depth-2 example are
// applied; the expected cell outputs and decision are the rule
//   (H15 & H16) | H26 | (H35 & H36 & H37 & H38) | (H46 & H48)
// written out bit by bit. A second instance with a different pair list
// (four pairs, cell 2 unused) checks that cells without pairs stay 0.
module tb_fdts_and_or;
  import fdts_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic [8:0] h;
  logic [3:0] cell_hit;
  logic       xhat;
  logic [3:0] h2;
  logic [2:0] cell2;
  logic       xhat2;

  fdts_and_or dut (.h(h), .cell_hit(cell_hit), .xhat(xhat));
  localparam int PAIRS2 [4] = '{1, 3, 1, 3};
  fdts_and_or #(.NPL(4), .NCELLS(3), .PAIR_IDX(PAIRS2)) dut2 (.h(h2), .cell_hit(cell2), .xhat(xhat2));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic h15, h16, h26, h35, h36, h37, h38, h46, h48;
      logic [3:0] ec;
      h = 9'(v);
      h2 = 4'(v);
      {h48, h46, h38, h37, h36, h35, h26, h16, h15} = 9'(v);
      ec[0] = h15 & h16;
      ec[1] = h26;
      ec[2] = h35 & h36 & h37 & h38;
      ec[3] = h46 & h48;
      @(posedge clk);
      check("cell_hit", int'(cell_hit), int'(ec));
      check("xhat", int'(xhat), int'(ec[0] | ec[1] | ec[2] | ec[3]));
      check("cell2", int'(cell2), int'({h2[1] & h2[3], 1'b0, h2[0] & h2[2]}));
      check("xhat2", int'(xhat2), int'((h2[1] & h2[3]) | (h2[0] & h2[2])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
