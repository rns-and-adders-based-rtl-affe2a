// Biased hard multiple |B + 3X| mod 2^N-1 in partially redundant form.
//
// 3X is formed as X + CLS(X,1), CLS being a circular left shift. Instead of
// one N-bit adder with an end-around carry, the addition is cut into
// M = N/K ripple-carry adders of K bits each. No carry passes between them:
// the carry out of adder j has weight 2^(K*(j+1)), which is the bottom bit
// of adder j+1 (adder M-1 wraps to bit 0 since 2^N = 1 mod 2^N-1), and it is
// kept as a separate bit. K therefore sets the longest carry chain and with
// it the delay of the hard multiple, which is how the design trades delay
// for area.
//
// At the bottom bit K*j of each group three bits of equal weight meet: the
// adder's sum bit s, the wrapped carry c of the group below and the bias bit
// 1. Their sum s+c+1 is written as one sum bit (s XNOR c) at K*j and one
// carry bit (s OR c) at K*j+1. The result satisfies
//   s + sum_j c[j] * 2^(K*j+1) = B + 3X  (mod 2^N-1),  B = sum_j 2^(K*j).
// The adder split, the bias and the XNOR/OR merge follow the design; the
// port layout (carry bits as a separate M-bit vector) is this model's.
//
// Interface: x (N bits) in; s (N bits) and c (M bits) out. Purely
// combinational, no clock.
module hard_multiple_gen #(
  parameter int N = 8,
  parameter int K = 4,
  localparam int M = N / K
) (
  input  logic [N-1:0] x,
  output logic [N-1:0] s,
  output logic [M-1:0] c
);

  logic [N-1:0] x2;       // CLS(X,1) = 2X mod 2^N-1
  logic [N-1:0] rsum;     // sum bits of the K-bit ripple-carry adders
  logic [M-1:0] rcout;    // carry out of each ripple-carry adder

  assign x2 = {x[N-2:0], x[N-1]};

  // K-bit ripple-carry adders built from full adders, carry-in 0.
  always_comb begin
    logic cy;
    for (int j = 0; j < M; j++) begin
      cy = 1'b0;
      for (int b = 0; b < K; b++) begin
        rsum[K*j+b] = x[K*j+b] ^ x2[K*j+b] ^ cy;
        cy          = (x[K*j+b] & x2[K*j+b]) | (cy & (x[K*j+b] ^ x2[K*j+b]));
      end
      rcout[j] = cy;
    end
  end

  // Bias insertion at the bottom bit of every group.
  always_comb begin
    logic cin;
    s = rsum;
    for (int j = 0; j < M; j++) begin
      cin      = rcout[(j + M - 1) % M];
      s[K*j]   = ~(rsum[K*j] ^ cin);
      c[j]     = rsum[K*j] | cin;
    end
  end

  initial assert (N % K == 0 && K >= 1 && N >= 3)
    else $error("hard_multiple_gen: K must divide N");

endmodule
