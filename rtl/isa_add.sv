// isa_add -- sub-adder (ADD) of one path of the inexact speculative adder.
//
// Adds the W-bit operand slices of its path and the carry-in it is given
// (the speculated carry from isa_spec, or 0 for the least significant path).
// Its carry-out is not forwarded as a carry; it only goes to the COMP of the
// next path, which compares it with that path's speculated carry.
//
// Interface: a, b, cin in; sum (W bits) and cout out. Combinational.
//
// The document gives only the function of the sub-adder; the adder
// architecture is left to synthesis (a plain "+"), which is this design's
// choice.
module isa_add #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  assign {cout, sum} = {1'b0, a} + {1'b0, b} + {{W{1'b0}}, cin};

endmodule
