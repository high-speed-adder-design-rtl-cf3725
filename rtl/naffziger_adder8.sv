// naffziger_adder8: 8-bit dual-rail domino adder in the Naffziger style,
// built on Ling's pseudo-carry equations.
//
// Bits are numbered 1..8 (bit 1 least significant); bit 0 stands for the
// carry-in, A_0 = B_0 = Cin. One clock phase phi drives every gate:
// phi low precharges all rails to 0, phi high evaluates. The signal flow is
//   1. dr_input_gen   operand and carry-in rails (both low while phi low)
//   2. gpk_cell x8    1-of-3-hot G/P/K per bit; bit 0 is G=Cin, P=0, K=~Cin
//   3. g3h4_gate x2   G3:1, H4:1 and G7:5, H8:5 straight from the bits
//      i4_gate   x2   I4:1 = P3P2P1P0 and I8:5 = P7P6P5P4 (OR propagates)
//   4. rc_gate   x2   G3:0 and G7:0 for pseudo-carry 0 and 1
//      manchester_chain x4  G0:0..G2:0 and G4:0..G6:0 for pseudo-carry 0, 1
//   5. sum_select x8  S_i = P_i xor (Cin ? G^1_{i-1:0} : G^0_{i-1:0})
//   plus long_carry    H8:0 and the carry out
//
// Interface: phi; a[8:1], b[8:1], cin single rail, held stable while phi is
// high; sum_h/sum_l[8:1] and cout_h/cout_l dual-rail results, valid (one
// rail high per bit) while phi is high and all low while phi is low. The
// model has no storage and no delay: results follow the inputs in the same
// evaluate phase. The reader of the outputs samples them before phi falls.
//
// Follows the original circuit: the 8-bit partition into two Ling groups of four,
// the pseudo-carry select between two carry sets, the length-3 Manchester
// chains, the 1-of-3 GPK code and the XOR propagate in the chains. This
// design's own choices: the logic-level domino model, the rail equations of
// the complement side and the carry-out output.
module naffziger_adder8
  import naff_pkg::*;
(
  input  logic       phi,
  input  logic [8:1] a,
  input  logic [8:1] b,
  input  logic       cin,
  output logic [8:1] sum_h,
  output logic [8:1] sum_l,
  output logic       cout_h,
  output logic       cout_l
);

  // ---- 1. input rails --------------------------------------------------
  dr_t [16:0] in_dr;        // [0] cin, [8:1] a, [16:9] b
  dr_t [8:0]  ar, br;       // bit 0 = carry-in
  dr_t        cin_dr;

  dr_input_gen #(.W(17)) u_in (
    .phi (phi),
    .x   ({b, a, cin}),
    .y   (in_dr)
  );

  always_comb begin
    cin_dr = in_dr[0];
    ar[0]  = cin_dr;
    br[0]  = cin_dr;
    for (int i = 1; i <= 8; i++) begin
      ar[i] = in_dr[i];
      br[i] = in_dr[i+8];
    end
  end

  // ---- 2. bitwise 1-of-3 GPK ------------------------------------------
  gpk_t [8:0] gpk;

  assign gpk[0] = '{g: cin_dr.h, p: 1'b0, k: cin_dr.l};

  for (genvar i = 1; i <= 8; i++) begin : g_gpk
    gpk_cell u_gpk (.phi(phi), .a(ar[i]), .b(br[i]), .gpk(gpk[i]));
  end

  // ---- 3. Ling group signals ------------------------------------------
  dr_t g31, h41, g75, h85, i41, i85;

  g3h4_gate u_gh_lo (.phi(phi), .a(ar[4:1]), .b(br[4:1]), .g3(g31), .h4(h41));
  g3h4_gate u_gh_hi (.phi(phi), .a(ar[8:5]), .b(br[8:5]), .g3(g75), .h4(h85));
  i4_gate   u_i_lo  (.phi(phi), .a(ar[3:0]), .b(br[3:0]), .i4(i41));
  i4_gate   u_i_hi  (.phi(phi), .a(ar[7:4]), .b(br[7:4]), .i4(i85));

  // ---- 4. carries for pseudo-carry 0 and 1 ----------------------------
  // carry[c][i] = G^c_{i:0}, i = 0..7
  dr_t [1:0][7:0] carry;

  for (genvar c = 0; c < 2; c++) begin : g_pc
    dr_t g30, g70, gm1;

    // Constant pseudo-carry G^c_{-1:0}; with P0 = 0 it is absorbed by the
    // first chain stage.
    assign gm1 = '{h: phi & c[0], l: phi & ~c[0]};

    rc_gate #(.PC(c[0])) u_rc (
      .phi (phi), .g31(g31), .i41(i41), .g75(g75), .i85(i85),
      .gpk4(gpk[4]), .g30(g30), .g70(g70)
    );

    manchester_chain u_mc_lo (
      .phi(phi), .gin(gm1), .gpk(gpk[2:0]), .gout(carry[c][2:0])
    );
    manchester_chain u_mc_hi (
      .phi(phi), .gin(g30), .gpk(gpk[6:4]), .gout(carry[c][6:4])
    );

    assign carry[c][3] = g30;
    assign carry[c][7] = g70;
  end

  // ---- 5. sum select ---------------------------------------------------
  for (genvar i = 1; i <= 8; i++) begin : g_sum
    dr_t s;
    sum_select u_sum (
      .phi(phi), .gpk(gpk[i]), .cin(cin_dr),
      .c0(carry[0][i-1]), .c1(carry[1][i-1]), .s(s)
    );
    assign sum_h[i] = s.h;
    assign sum_l[i] = s.l;
  end

  // ---- long pseudo-carry and carry out ---------------------------------
  dr_t h80, cout_dr;

  long_carry u_lc (
    .phi(phi), .h41(h41), .i41(i41), .h85(h85), .i85(i85),
    .gpk8(gpk[8]), .h80(h80), .cout(cout_dr)
  );

  assign cout_h = cout_dr.h;
  assign cout_l = cout_dr.l;

  // ---- dual-rail protocol ----------------------------------------------
  // Sampled just before phi falls: every output pair holds one legal value.
  // Sampled just before phi rises: every output rail has precharged to 0.
  a_eval_valid : assert property (@(negedge phi)
    ((sum_h ^ sum_l) == 8'hFF) && (cout_h ^ cout_l) && h80.h != h80.l);
  a_precharge_null : assert property (@(posedge phi)
    (sum_h == '0) && (sum_l == '0) && !cout_h && !cout_l);

endmodule
