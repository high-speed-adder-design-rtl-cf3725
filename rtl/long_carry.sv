// long_carry: long Ling pseudo-carry over all eight bits and the carry out.
//
// The group pseudo-generates and pseudo-propagates are combined with the
// Ling recursion H_{i:j} = H_{i:k} + I_{i:k} H_{k-1:j}:
//   H4:0 = H4:1 + I4:1            (H_{0:0} = Cin, already a factor of I4:1)
//   H8:0 = H8:5 + I8:5 H4:0
// and the real carry out of bit 8 is recovered by putting back the dropped
// propagate: Cout = G8:0 = (A8 + B8) H8:0.
//
// Interface: phi (high = evaluate); h41, i41, h85, i85 dual rail; gpk8 the
// 1-of-3 code of bit 8; h80 and cout dual rail. Zero-delay domino model.
//
// The original circuit builds H8:5 and combines the H and I signals into a
// long carry, but shows no gate for it and brings no carry out of the adder.
// This gate and the carry-out port are this design's own completion of that
// step, using the same Ling equations.
module long_carry
  import naff_pkg::*;
(
  input  logic phi,
  input  dr_t  h41,
  input  dr_t  i41,
  input  dr_t  h85,
  input  dr_t  i85,
  input  gpk_t gpk8,
  output dr_t  h80,
  output dr_t  cout
);

  dr_t h40, p8;

  always_comb begin
    p8    = gpk_or(gpk8);
    h40.h = h41.h | i41.h;
    h40.l = h41.l & i41.l;
    h80.h = phi & (h85.h | (i85.h & h40.h));
    h80.l = phi & (h85.l & (i85.l | h40.l));
    cout.h = phi & p8.h & h80.h;
    cout.l = phi & (p8.l | h80.l);
  end

endmodule
