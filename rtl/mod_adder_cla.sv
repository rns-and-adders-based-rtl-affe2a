// Two-operand modulo 2^N-1 adder, one-level carry-lookahead with end-around
// carry.
//
// With generate G_i = a_i & b_i and propagate P_i = a_i ^ b_i, the carry out
// of bit i is the OR, over every bit j, of G_j propagated through all bits
// between j and i. Modulo 2^N-1 the carry out of the top bit re-enters at
// bit 0, so "between" is taken cyclically:
//   C_i = G_i + P_i G_(i-1) + ... + P_i ... P_1 G_0
//             + P_i ... P_0 G_(N-1) + ... + P_i ... P_0 P_(N-1) ... P_(i+2) G_(i+1)
//   S_i = P_i ^ C_(i-1),   C_(-1) = C_(N-1).
// A carry can never run the full circle, since that needs every P_i = 1 and
// then no G_i is set, so the logic is loop-free. The cyclic lookahead
// equations are the design's; it is written flat, one product term per
// distance, as a one-level lookahead.
//
// The result lies in 0..2^N-1. Zero has two codes: a sum that is 2^N-1
// exactly (every P_i = 1) comes out as all ones, as does 2^N-1 + 2^N-1.
//
// Interface: a, b (N bits) in; s (N bits) out. Combinational.
module mod_adder_cla #(
  parameter int N = 8
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s
);

  logic [N-1:0] g, p, cy;

  assign g = a & b;
  assign p = a ^ b;

  always_comb begin
    logic term;
    for (int i = 0; i < N; i++) begin
      cy[i] = 1'b0;
      for (int t = 0; t < N; t++) begin
        term = g[(i - t + N) % N];
        for (int u = 0; u < t; u++) term = term & p[(i - u + N) % N];
        cy[i] = cy[i] | term;
      end
    end
  end

  assign s = p ^ {cy[N-2:0], cy[N-1]};

endmodule
