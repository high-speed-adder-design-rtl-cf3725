// gpk_cell: 1-of-3-hot bitwise generate / propagate / kill for one bit.
//
// From the dual-rail operand bits A_i and B_i the cell raises exactly one of
//   G = A_h & B_h                       (both ones: generate)
//   P = A_h & B_l | A_l & B_h = A ^ B    (exactly one: propagate)
//   K = A_l & B_l                       (both zeros: kill)
// Because the three are mutually exclusive, K doubles as the complement of G
// for the complement half of the adder, and one propagate serves both
// halves, which is why this code needs fewer cells than a full dual-rail
// G/P pair.
//
// Interface: phi (high = evaluate), a and b dual-rail, gpk 1-of-3 output.
// Zero-delay domino model: all outputs are low while phi is low.
//
// Follows the original circuit: the three equations and the shared pull-down of the
// cell. The logic-level model (no transistors, no sizing) is this design's.
module gpk_cell
  import naff_pkg::*;
(
  input  logic phi,
  input  dr_t  a,
  input  dr_t  b,
  output gpk_t gpk
);

  always_comb begin
    gpk.g = phi & (a.h & b.h);
    gpk.p = phi & ((a.h & b.l) | (a.l & b.h));
    gpk.k = phi & (a.l & b.l);
  end

endmodule
