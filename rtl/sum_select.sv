// sum_select: carry-select multiplexer merged with the sum XOR, one bit.
//
//   S_i = P_i xor (Cin_l G^0_{i-1:0} + Cin_h G^1_{i-1:0})
// The real carry-in picks between the carry computed for pseudo-carry 0 and
// the one computed for pseudo-carry 1, and the result is XORed with the
// bit's propagate. The gate takes the complement of the propagate as
// G_i + K_i from the 1-of-3 code, so no extra inverter is needed, and builds
// both sum rails from the same inputs.
//
// Interface: phi (high = evaluate), gpk the bit's 1-of-3 code, cin, c0
// (G^0_{i-1:0}) and c1 (G^1_{i-1:0}) dual rail, s dual rail.
// Zero-delay domino model, all low while phi is low.
//
// Follows the original circuit: the equation and the merged mux/XOR structure.
module sum_select
  import naff_pkg::*;
(
  input  logic phi,
  input  gpk_t gpk,
  input  dr_t  cin,
  input  dr_t  c0,
  input  dr_t  c1,
  output dr_t  s
);

  logic carry_h, carry_l, pbar;

  always_comb begin
    carry_h = (cin.l & c0.h) | (cin.h & c1.h);
    carry_l = (cin.l & c0.l) | (cin.h & c1.l);
    pbar    = gpk.g | gpk.k;
    s.h     = phi & ((gpk.p & carry_l) | (pbar & carry_h));
    s.l     = phi & ((gpk.p & carry_h) | (pbar & carry_l));
  end

endmodule
