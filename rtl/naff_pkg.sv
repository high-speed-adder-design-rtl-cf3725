// naff_pkg: shared types and helpers for the dual-rail domino Ling adder.
//
// Every logic signal of the adder travels on two wires, a true rail (h) and
// a complement rail (l). The encoding follows the adder's clocking table:
//   h=0 l=0  precharge (clock low, no value yet)
//   h=0 l=1  evaluated '0'
//   h=1 l=0  evaluated '1'
//   h=1 l=1  illegal
// The bitwise generate/propagate/kill signals use a 1-of-3-hot code instead:
// during evaluation exactly one of g, p, k is high, in precharge none is.
//
// The gates are modelled at the logic level: each output rail is a monotone
// (inverter-free) function of input rails, ANDed with the clock phase phi to
// stand for the clocked foot transistor and the precharge device. That keeps
// the two properties a domino pipeline relies on: everything is low while
// phi is low, and rails only rise during evaluation.
package naff_pkg;

  // Dual-rail bit.
  typedef struct packed {
    logic h;
    logic l;
  } dr_t;

  // 1-of-3-hot bitwise generate / propagate / kill.
  typedef struct packed {
    logic g;
    logic p;
    logic k;
  } gpk_t;

  // Dual-rail pair from a single-rail value during evaluation.
  function automatic dr_t dr_of(input logic v);
    return '{h: v, l: ~v};
  endfunction

  // True when a pair carries a legal evaluated value.
  function automatic logic dr_valid(input dr_t d);
    return d.h ^ d.l;
  endfunction

  // OR-propagate (A | B) of a bit, as a dual-rail pair, from its GPK code:
  // A|B = G|P and its complement is K.
  function automatic dr_t gpk_or(input gpk_t x);
    return '{h: x.g | x.p, l: x.k};
  endfunction

  // Bitwise generate as a dual-rail pair: complement of G is P|K.
  function automatic dr_t gpk_gen(input gpk_t x);
    return '{h: x.g, l: x.p | x.k};
  endfunction

endpackage
