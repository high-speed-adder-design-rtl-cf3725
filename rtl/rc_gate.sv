// rc_gate: carry between the two 4-bit groups for one assumed pseudo-carry.
//
// The adder evaluates its carries twice, once for an assumed incoming
// pseudo-carry of 0 and once for 1 (PC below), and lets the sum gates pick
// the right set with the real carry-in. This gate produces the two group
// generates that feed the Manchester chains:
//   PC=0:  G3:0 = G3:1
//   PC=1:  G3:0 = G3:1 + I4:1
//   G7:0 = G7:5 + I8:5 (G3:0 + G4)
// I8:5 = P7 P6 P5 P4 (OR propagates) carries the dropped P4 of the Ling
// form, so G3:0 + G4 is in effect the group-1 pseudo-carry H4:0.
// The G7:0 stage is a parallel G3:0 / G4 pull-down, a series I8:5 device and
// a parallel G7:5 device, the same on the complement side.
//
// Interface: phi (high = evaluate); g31, i41, g75, i85 dual rail from the
// G3H4 and I4 gates; gpk4 the 1-of-3 code of bit 4; g30 and g70 dual rail.
// Zero-delay domino model, all low while phi is low.
//
// Follows the original circuit: the four equations and the G7:0 structure. Folding
// both G3:0 variants and G7:0 into one module selected by a parameter, and
// the complement-rail equations, are this design's.
module rc_gate
  import naff_pkg::*;
#(
  parameter bit PC = 1'b0  // assumed pseudo-carry G_{-1:0}
) (
  input  logic phi,
  input  dr_t  g31,
  input  dr_t  i41,
  input  dr_t  g75,
  input  dr_t  i85,
  input  gpk_t gpk4,
  output dr_t  g30,
  output dr_t  g70
);

  dr_t g4;

  always_comb begin
    g4 = gpk_gen(gpk4);

    if (PC) begin
      g30.h = phi & (g31.h | i41.h);
      g30.l = phi & (g31.l & i41.l);
    end else begin
      g30.h = phi & g31.h;
      g30.l = phi & g31.l;
    end

    g70.h = phi & (g75.h | (i85.h & (g30.h | g4.h)));
    g70.l = phi & (g75.l & (i85.l | (g30.l & g4.l)));
  end

endmodule
