// manchester_chain: dual-rail Manchester carry chain of length three.
//
// Starting from a group generate gin = G_{k-1:0}, each stage j applies
//   G_{k+j:0}   = G_{k+j} + P_{k+j} G_{k+j-1:0}
//   G_{k+j:0}_l = K_{k+j} + P_{k+j} G_{k+j-1:0}_l
// The propagate used here is the XOR propagate of the 1-of-3 GPK cell.
// That is enough: where A and B are both 1 the chain output is already
// forced by G, so XOR and OR propagates give the same result, and one P
// serves the true and the complement chain alike.
// In the adder four chains are used: bits 0..2 from the constant pseudo-
// carry G_{-1:0} and bits 4..6 from G3:0, each for pseudo-carry 0 and 1.
//
// Interface: phi (high = evaluate), gin dual rail, gpk[2:0] the 1-of-3
// codes of bits k..k+2, gout[2:0] = G_{k:0}, G_{k+1:0}, G_{k+2:0} dual rail.
// Zero-delay model of a precharged pass-transistor chain: all low while phi
// is low.
//
// Follows the original circuit: the stage equations, the shared P pass device and
// the G / K pull-downs on the two rails.
module manchester_chain
  import naff_pkg::*;
(
  input  logic           phi,
  input  dr_t            gin,
  input  gpk_t     [2:0] gpk,
  output dr_t      [2:0] gout
);

  dr_t carry;

  always_comb begin
    carry = gin;
    for (int j = 0; j < 3; j++) begin
      gout[j].h = phi & (gpk[j].g | (gpk[j].p & carry.h));
      gout[j].l = phi & (gpk[j].k | (gpk[j].p & carry.l));
      carry     = gout[j];
    end
  end

endmodule
