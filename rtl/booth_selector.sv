// Radix-8 Booth selector: one bit of a partial product.
//
// The one-hot select from the Booth encoder gates one of four candidate
// bits, the bit of the X, 2X, 3X or 4X multiple at this position, and the
// result is inverted when sign is 1 (a one's-complement negation, which is
// exact modulo 2^N-1). With no select set the output is just sign. The
// inputs and the select-then-invert order follow the design's selector
// figure.
//
// Interface: sel_x, sel_2x, sel_3x, sel_4x, sign, m1, m2, m3, m4 in; pp out.
// Combinational.
module booth_selector (
  input  logic sel_x,
  input  logic sel_2x,
  input  logic sel_3x,
  input  logic sel_4x,
  input  logic sign,
  input  logic m1,
  input  logic m2,
  input  logic m3,
  input  logic m4,
  output logic pp
);

  assign pp = sign ^ ((sel_x & m1) | (sel_2x & m2) | (sel_3x & m3) | (sel_4x & m4));

endmodule
