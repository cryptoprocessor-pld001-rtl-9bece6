// alu24: one of the four 24-bit ALU units of the PLD001 datapath.
//
// Each unit multiplies an 8-bit operand by a 24-bit operand and adds the
// product to up to three further arguments in one combinational pass, the way
// a multiplier built as an 8-argument carry-save tree with a carry-look-ahead
// adder at its end does: the eight partial products a[i]*b*2^i are the tree's
// arguments. The document describes the units as 8-argument CSA adders with a
// CLA; the extra addends, the optional negation of the product and the
// optional shift of the product by 8 bits (used when two units are chained as
// a 16x16 multiplier, Fig. 3) are this design's way of giving the units the
// functions the document's schedules require.
//
//   s = x + y + z + (neg ? -P : P),   P = (a * b) << (sh8 ? 8 : 0)
//
// All addends and the result are 36-bit two's complement. With sh8 set, b must
// be below 2^17 (IDEA operands) so that the shifted product fits. Purely
// combinational.
module alu24 (
  input  logic [7:0]         a,
  input  logic [23:0]        b,
  input  logic               sh8,
  input  logic               neg,
  input  logic signed [35:0] x,
  input  logic signed [35:0] y,
  input  logic signed [35:0] z,
  output logic signed [35:0] s
);
  logic [35:0] prod;

  always_comb begin
    prod = '0;
    for (int i = 0; i < 8; i++)
      if (a[i]) prod = prod + (36'(b) << i);   // partial products of the tree
    if (sh8) prod = prod << 8;
    s = x + y + z + (neg ? -$signed(prod) : $signed(prod));
  end
endmodule
