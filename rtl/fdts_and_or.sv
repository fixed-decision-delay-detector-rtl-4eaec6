// fdts_and_or -- decision logic of the FDTS detector.
//
// Every Voronoi cell V_i of a noiseless point with x_{k-tau} = +1 is the
// intersection of the half-spaces H_ij of its retained Delaunay neighbour
// pairs, so the slicer bits of those pairs are ANDed, one AND gate per cell.
// The detector input lies in the +1 decision region when it lies in any of
// these cells, so the AND outputs are ORed. The OR output is the decision;
// the final mapper of the structure (1 -> +1, 0 -> -1) is kept as the bit
// convention: xhat = 1 means +1 and xhat = 0 means -1.
//
// Interface: h[p] is the slicer bit of pair p, whose +1 point is PAIR_I[p]
// (1 .. NCELLS). cell_hit[i-1] is the AND of cell i (0 when no pair names that
// point). Purely combinational. The defaults are the nine pairs of the
// depth-2 example, which gives the rule
//   (H15 & H16) | H26 | (H35 & H36 & H37 & H38) | (H46 & H48).
module fdts_and_or
  import fdts_pkg::*;
#(
  parameter int NPL             = NPLANES,
  parameter int NCELLS          = 2 ** TAU,
  parameter int PAIR_IDX [NPL]  = PAIR_I
) (
  input  logic [NPL-1:0]    h,
  output logic [NCELLS-1:0] cell_hit,
  output logic              xhat
);

  always_comb begin
    for (int c = 0; c < NCELLS; c++) begin
      logic used;
      logic all_in;
      used   = 1'b0;
      all_in = 1'b1;
      for (int p = 0; p < NPL; p++) begin
        if (PAIR_IDX[p] == c + 1) begin
          used   = 1'b1;
          all_in = all_in & h[p];
        end
      end
      cell_hit[c] = used & all_in;
    end
    xhat = |cell_hit;
  end

endmodule
