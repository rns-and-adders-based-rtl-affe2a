// Radix-8 Booth encoded modulo 2^N-1 multiplier, P = |X * Y| mod 2^N-1.
//
// This is the 2^N-1 channel of a residue number system built on the moduli
// {2^N-1, 2^N, 2^N+1}. It works in three steps: modulo partial-product
// generation, carry-save accumulation with end-around carries, and one
// two-operand modulo adder.
//
// Partial products. Y is recoded into floor(N/3)+1 radix-8 Booth digits in
// -4..+4 (three digits for N=8), with a zero appended below bit 0 and zeros
// above bit N-1. Digit i selects one of the multiples 0, X, 2X, 3X, 4X of
// the multiplicand and a sign, and the row is rotated left by 3i. The
// multiples 2X and 4X are rotations of X; the hard multiple 3X is made by
// N/K separate K-bit ripple-carry adders whose carry-outs are kept as extra
// bits, so K bounds its carry chain (and with it the delay). To keep the
// complemented form of 3X from turning its empty carry positions into long
// runs of ones, every multiple carries a bias B = sum_j 2^(K*j). Each row
// is an N-bit vector pp_i plus N/K redundancy carry bits q_i.
//
// Accumulation. The rows, their carry bits (packed into one vector when
// they do not collide, as for N=8, K=4) and the compensation constant
// CC = -(sum_i 2^(3i) B) mod 2^N-1 (34 for N=8, K=4) are added in a tree of
// end-around carry-save adders, and a carry-lookahead adder with end-around
// carry adds the last two vectors.
//
// The structure and the defaults N=8, K=4 follow the design. Making it purely
// combinational (no clock, register or handshake) is this model's choice;
// the design names no timing.
// Zero may come out as all ones (the second code of zero modulo 2^N-1).
//
// Interface: x, y (N bits) in; p (N bits) out.
module mod_mult_radix8
  import mod_mult_pkg::*;
#(
  parameter int N = 8,
  parameter int K = 4
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N-1:0] p
);

  localparam int M    = N / K;
  localparam int ND   = num_digits(N);
  localparam bit QDIS = q_disjoint(N, K);
  localparam int NOPS = num_operands(N, K);
  localparam word_t CC_W = comp_const(N, K);
  localparam logic [N-1:0] CC = CC_W[N-1:0];

  // ---- biased multiples ---------------------------------------------------
  logic [N-1:0] s1, s2, s3, s4;
  logic [M-1:0] c1, c2, c3, c4;

  soft_multiples #(.N(N), .K(K)) u_soft (
    .x(x), .s1(s1), .s2(s2), .s4(s4), .c1(c1), .c2(c2), .c4(c4)
  );

  hard_multiple_gen #(.N(N), .K(K)) u_hard (
    .x(x), .s(s3), .c(c3)
  );

  // ---- Booth rows -----------------------------------------------------------
  // yext[b+1] = y[b]; yext[0] and everything above bit N are zero.
  logic [3*ND:0] yext;
  assign yext = {{(3*ND-N){1'b0}}, y, 1'b0};

  logic [N-1:0] pp [ND];
  logic [N-1:0] q  [ND];

  for (genvar i = 0; i < ND; i++) begin : g_row
    pp_row #(.N(N), .K(K), .IDX(i)) u_row (
      .quartet(yext[3*i +: 4]),
      .s1(s1), .s2(s2), .s3(s3), .s4(s4),
      .c1(c1), .c2(c2), .c3(c3), .c4(c4),
      .pp(pp[i]), .q(q[i])
    );
  end

  // ---- carry-save accumulation ---------------------------------------------
  logic [N-1:0] ops [NOPS];

  for (genvar i = 0; i < ND; i++) begin : g_ops_pp
    assign ops[i] = pp[i];
  end

  if (QDIS) begin : g_qpacked
    always_comb begin
      ops[ND] = '0;
      for (int i = 0; i < ND; i++) ops[ND] = ops[ND] | q[i];
    end
  end else begin : g_qsep
    for (genvar i = 0; i < ND; i++) begin : g_q
      assign ops[ND + i] = q[i];
    end
  end

  assign ops[NOPS-1] = CC;

  logic [N-1:0] acc_s, acc_c;

  mod_csa_tree #(.N(N), .NOPS(NOPS)) u_csa (
    .ops(ops), .sum(acc_s), .carry(acc_c)
  );

  // ---- final end-around carry-lookahead adder -------------------------------
  mod_adder_cla #(.N(N)) u_cpa (
    .a(acc_s), .b(acc_c), .s(p)
  );

  initial assert (N % K == 0 && N >= 3 && N <= MAX_N)
    else $error("mod_mult_radix8: need K | N and 3 <= N <= %0d", MAX_N);

endmodule
