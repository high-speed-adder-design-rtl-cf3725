// dr_input_gen: turns single-rail operand bits into dual-rail domino inputs.
//
// Domino gates must see both rails of every input low during precharge, or
// some nodes would not precharge. This block is the input multiplexer the
// adder is tested with: while the clock phi is low both rails are held low;
// while phi is high the true rail carries the input and the complement rail
// carries its inverse.
//
// Interface: phi (clock phase, high = evaluate), x[W-1:0] single-rail inputs,
// y[W-1:0] dual-rail outputs. Purely combinational, zero delay; the inputs
// must be stable while phi is high.
//
// Follows the original circuit: the clock-switched mux with an inverter for the
// complement. The bus width W is this design's choice (17 bits in the adder:
// A, B and the carry-in).
module dr_input_gen
  import naff_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic         phi,
  input  logic [W-1:0] x,
  output dr_t  [W-1:0] y
);

  always_comb begin
    for (int i = 0; i < W; i++) begin
      y[i].h = phi & x[i];
      y[i].l = phi & ~x[i];
    end
  end

endmodule
