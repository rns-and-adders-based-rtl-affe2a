// Radix-8 Booth encoder.
//
// A radix-8 Booth digit d = -4*y2 + 2*y1 + y0 + ym1 (in -4..+4) is recoded
// from the overlapping quartet {y(3i+2), y(3i+1), y(3i), y(3i-1)} of the
// multiplier. The encoder produces a sign bit and a one-hot magnitude
// select: sel_x, sel_2x, sel_3x or sel_4x, or none of them for digit 0.
// The quartets 0000 and 1111 are both digit 0; 1111 gives sign 1 with no
// select, the "-0" that the selector turns into an all-ones vector (zero
// modulo 2^N-1). The mapping is that of the design's recoding table.
//
// The magnitude depends only on the three neighbour differences
//   p = y2 ^ y1,  q = y1 ^ y0,  r = y0 ^ ym1:
//   |d| = 1 when !p & r,  2 when q & !r,  3 when p & r,  4 when p & !q & !r.
// The sign is y2. Gate choice is this model's own.
//
// Interface: quartet[3:0] = {y(3i+2), y(3i+1), y(3i), y(3i-1)} in; sign and
// the four selects out. Combinational.
module booth_encoder (
  input  logic [3:0] quartet,
  output logic       sign,
  output logic       sel_x,
  output logic       sel_2x,
  output logic       sel_3x,
  output logic       sel_4x
);

  logic p, q, r;

  assign p = quartet[3] ^ quartet[2];
  assign q = quartet[2] ^ quartet[1];
  assign r = quartet[1] ^ quartet[0];

  assign sign   = quartet[3];
  assign sel_x  = ~p & r;
  assign sel_2x = q & ~r;
  assign sel_3x = p & r;
  assign sel_4x = p & ~q & ~r;

endmodule
