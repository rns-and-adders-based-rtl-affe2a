// One modulo 2^N-1 partial product row of the radix-8 Booth multiplier.
//
// Row IDX handles Booth digit d = d_IDX of the multiplier and produces
//   pp + q = 2^(3*IDX) * (B + d*X)  (mod 2^N-1),
// where B = sum_j 2^(K*j) is the bias carried by every multiple. A Booth
// encoder turns the quartet into a sign and a one-hot select, and N+M Booth
// selectors (ten for N=8, K=4) pick the biased multiple |B + |d|*X| bit by
// bit: N selectors for the sum vector and M for the sparse carry bits. A
// negative digit complements both; the ones that complementing puts into the
// empty carry positions are a constant that the compensation constant
// absorbs, so the complemented vector stands for B - |d|*X. The row is then
// rotated left by 3*IDX, which multiplies it by 8^IDX modulo 2^N-1, so the
// carry bit j ends up at position (K*j + 1 + 3*IDX) mod N.
//
// Digit 0 has to give B, not zero. The AND-OR selector gives 0 when no
// select is set, so at the bias positions K*j (where every biased
// soft multiple holds an inverted bit) the selector is fed the inverted
// candidate bits and the inverted sign; its output is then the true biased
// bit for every digit, and 1 for digit 0. This input arrangement is this
// model's own; the encoder/selector split, the count of selectors and the
// rotation follow the design.
//
// Interface: quartet {y(3i+2), y(3i+1), y(3i), y(3i-1)}; biased multiples
// (s1,c1) = B+X, (s2,c2) = B+2X, (s3,c3) = B+3X, (s4,c4) = B+4X with carry
// bit j of weight 2^(K*j+1); outputs pp (N bits) and q (N bits, only the M
// rotated carry positions can be 1). Combinational.
module pp_row #(
  parameter int N   = 8,
  parameter int K   = 4,
  parameter int IDX = 0,
  localparam int M  = N / K
) (
  input  logic [3:0]   quartet,
  input  logic [N-1:0] s1, s2, s3, s4,
  input  logic [M-1:0] c1, c2, c3, c4,
  output logic [N-1:0] pp,
  output logic [N-1:0] q
);

  localparam int SH = (3 * IDX) % N;

  logic sign, sel_x, sel_2x, sel_3x, sel_4x;
  logic [N-1:0] v;    // selected biased multiple, before rotation
  logic [M-1:0] qv;   // selected carry bits, before rotation

  booth_encoder u_be (
    .quartet(quartet), .sign(sign),
    .sel_x(sel_x), .sel_2x(sel_2x), .sel_3x(sel_3x), .sel_4x(sel_4x)
  );

  for (genvar b = 0; b < N; b++) begin : g_bit
    if (b % K == 0) begin : g_bias
      booth_selector u_bs (
        .sel_x(sel_x), .sel_2x(sel_2x), .sel_3x(sel_3x), .sel_4x(sel_4x),
        .sign(~sign), .m1(~s1[b]), .m2(~s2[b]), .m3(~s3[b]), .m4(~s4[b]),
        .pp(v[b])
      );
    end else begin : g_plain
      booth_selector u_bs (
        .sel_x(sel_x), .sel_2x(sel_2x), .sel_3x(sel_3x), .sel_4x(sel_4x),
        .sign(sign), .m1(s1[b]), .m2(s2[b]), .m3(s3[b]), .m4(s4[b]),
        .pp(v[b])
      );
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_carry
    booth_selector u_bs (
      .sel_x(sel_x), .sel_2x(sel_2x), .sel_3x(sel_3x), .sel_4x(sel_4x),
      .sign(sign), .m1(c1[j]), .m2(c2[j]), .m3(c3[j]), .m4(c4[j]),
      .pp(qv[j])
    );
  end

  // Rotation by 3*IDX places.
  for (genvar b = 0; b < N; b++) begin : g_rot
    assign pp[(b + SH) % N] = v[b];
  end

  always_comb begin
    q = '0;
    for (int j = 0; j < M; j++) q[(K*j + 1 + SH) % N] = qv[j];
  end

endmodule
