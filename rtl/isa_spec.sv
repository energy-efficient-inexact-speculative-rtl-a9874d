// isa_spec -- carry speculator (SPEC) of the inexact speculative adder.
//
// Guesses the carry into a sub-adder from only the SPEC_W most significant
// operand bits of the path below it, instead of waiting for that path's real
// carry-out. The window is evaluated carry look-ahead style: bit-level
// generate/propagate signals are merged into one group generate and one group
// propagate, and the carry into the bottom of the window is taken to be the
// constant SPEC_CIN. The guess is therefore exact whenever the window
// generates or kills the carry; only when every bit of the window propagates
// is the result a guess (SPEC_CIN).
//
// Interface: a, b are the window bits (bit SPEC_W-1 is the most significant);
// c_spec is the speculated carry. Purely combinational, no clock.
//
// Follows the document: look-ahead over a limited number of input bits, chain
// speculated at 0. Design choice: SPEC_CIN is a parameter (default 0) so the
// guess for a fully propagating window can be set to 1.
module isa_spec #(
  parameter int unsigned SPEC_W   = 2,
  parameter logic        SPEC_CIN = 1'b0
) (
  input  logic [SPEC_W-1:0] a,
  input  logic [SPEC_W-1:0] b,
  output logic              c_spec
);

  logic [SPEC_W-1:0] g, p;
  logic              grp_g, grp_p;

  assign g = a & b;
  assign p = a ^ b;

  // Merge (g,p) pairs from LSB to MSB: G = g_i | p_i & G_low, P = p_i & P_low.
  always_comb begin
    grp_g = 1'b0;
    grp_p = 1'b1;
    for (int i = 0; i < int'(SPEC_W); i++) begin
      grp_g = g[i] | (p[i] & grp_g);
      grp_p = p[i] & grp_p;
    end
  end

  assign c_spec = grp_g | (grp_p & SPEC_CIN);

endmodule
