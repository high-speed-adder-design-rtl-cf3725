// i4_gate: Ling pseudo-propagate of a 4-bit group, dual rail.
//
// I = (A_3+B_3)(A_2+B_2)(A_1+B_1)(A_0+B_0), the group propagate shifted down
// by one bit to make up for the propagate dropped from the pseudo-generate.
// The inputs are therefore the four bits just below the group's top bit:
// bits 0..3 (bit 0 being the carry-in, A_0 = B_0 = Cin) for I4:1, bits 4..7
// for I8:5. Two series pairs of parallel OR terms are evaluated separately
// and then combined, which the module mirrors with two partial products.
//
// Interface: phi (high = evaluate), a[3:0] and b[3:0] dual rail (index 0 the
// lowest of the four bits used), i4 dual rail. Zero-delay domino model.
//
// Follows the original circuit: the OR-propagate product and the split into two
// 2-bit halves. The complement rail is this design's own derivation.
module i4_gate
  import naff_pkg::*;
(
  input  logic      phi,
  input  dr_t [3:0] a,
  input  dr_t [3:0] b,
  output dr_t       i4
);

  logic lo_h, hi_h, lo_l, hi_l;

  always_comb begin
    lo_h = (a[0].h | b[0].h) & (a[1].h | b[1].h);
    hi_h = (a[2].h | b[2].h) & (a[3].h | b[3].h);
    lo_l = (a[0].l & b[0].l) | (a[1].l & b[1].l);
    hi_l = (a[2].l & b[2].l) | (a[3].l & b[3].l);
    i4.h = phi & lo_h & hi_h;
    i4.l = phi & (lo_l | hi_l);
  end

endmodule
