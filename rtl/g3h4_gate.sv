// g3h4_gate: Ling pseudo-generate of a 4-bit group, dual rail.
//
// Computed directly from the operand bits (not from the GPK cells), with
// bit 1 the least significant of the group and all generate and propagate
// terms of OR type (G_i = A_i B_i, P_i = A_i + B_i):
//   G3 = G_3 + P_3 (G_2 + P_2 G_1)        (3-bit group generate, by-product)
//   H4 = G_4 + G3                         (Ling pseudo-generate: P_4 dropped)
// In the adder it is used twice: bits 1..4 give G3:1 and H4:1, bits 5..8
// give G7:5 and H8:5.
//
// Interface: phi (high = evaluate), a[4:1] and b[4:1] dual rail, g3 and h4
// dual rail. The complement rails are the dual monotone functions of the
// complement input rails, so each pair is legal whenever the inputs are.
// Zero-delay domino model, all low while phi is low.
//
// Follows the original circuit: the equations and the G3 by-product. The complement
// rail equations are this design's own derivation.
module g3h4_gate
  import naff_pkg::*;
(
  input  logic      phi,
  input  dr_t [4:1] a,
  input  dr_t [4:1] b,
  output dr_t       g3,
  output dr_t       h4
);

  // True-rail and complement-rail bitwise terms.
  logic [4:1] gen_h, gen_l;  // A&B and its complement A_l|B_l
  logic [3:2] or_h, or_l;    // A|B and its complement A_l&B_l

  always_comb begin
    for (int i = 1; i <= 4; i++) begin
      gen_h[i] = a[i].h & b[i].h;
      gen_l[i] = a[i].l | b[i].l;
    end
    for (int i = 2; i <= 3; i++) begin
      or_h[i] = a[i].h | b[i].h;
      or_l[i] = a[i].l & b[i].l;
    end

    g3.h = phi & (gen_h[3] | (or_h[3] & (gen_h[2] | (or_h[2] & gen_h[1]))));
    g3.l = phi & (gen_l[3] & (or_l[3] | (gen_l[2] & (or_l[2] | gen_l[1]))));

    h4.h = g3.h | (phi & gen_h[4]);
    h4.l = g3.l & gen_l[4];
  end

endmodule
