// Biased soft multiples |B + X|, |B + 2X| and |B + 4X| mod 2^N-1.
//
// Because the hard multiple carries the bias B = sum_j 2^(K*j), every other
// multiple must carry it too so that the Booth selector can pick any of
// them. The soft multiples are circular left shifts of X by 0, 1 and 2
// places. Adding B to such a vector v changes only the bottom bit of every
// K-bit group: v[K*j] + 1 is written as the sum bit ~v[K*j] at position K*j
// and the carry bit v[K*j] at position K*j+1. So
//   s + sum_j c[j] * 2^(K*j+1) = B + m*X  (mod 2^N-1),  m = 1, 2, 4.
// This is the layout of the design's soft-multiple table; the multiple
// B+0 = B needs no wires and is produced inside the Booth row.
//
// Interface: x (N bits) in; sum vectors s1, s2, s4 (N bits) and carry
// vectors c1, c2, c4 (M bits, bit j has weight 2^(K*j+1)). Combinational.
module soft_multiples #(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] s1, s2, s4,
  output logic [M-1:0] c1, c2, c4
);

  logic [N-1:0] v1, v2, v4;

  assign v1 = x;
  assign v2 = {x[N-2:0], x[N-1]};
  assign v4 = {x[N-3:0], x[N-1:N-2]};

  always_comb begin
    s1 = v1;
    s2 = v2;
    s4 = v4;
    for (int j = 0; j < M; j++) begin
      s1[K*j] = ~v1[K*j];
      s2[K*j] = ~v2[K*j];
      s4[K*j] = ~v4[K*j];
      c1[j]   = v1[K*j];
      c2[j]   = v2[K*j];
      c4[j]   = v4[K*j];
    end
  end

endmodule
