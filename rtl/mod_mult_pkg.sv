// Shared constants and elaboration-time helpers of the radix-8 Booth
// modulo 2^N-1 multiplier.
//
// The multiplier works on residues of width N (8 by default). Its
// partial products carry a bias B = sum_j 2^(K*j), one bit at the bottom of
// every K-bit group, so that the negative hard multiple needs no long runs
// of ones (this follows the design). Every Booth row i adds the bias shifted
// left by 3*i, and the compensation constant CC below cancels the sum of
// those shifted biases modulo 2^N-1.
//
// The functions here are used only at elaboration, to size ports and fold
// constants. They work on up to MAX_N bits; N may be at most 32 so that the
// modular arithmetic fits in 64 bits.
package mod_mult_pkg;

  localparam int MAX_N = 32;
  typedef logic [MAX_N-1:0] word_t;

  // Number of radix-8 Booth digits of an unsigned N-bit multiplier that is
  // extended with a zero below bit 0 and zeros above bit N-1: floor(N/3)+1.
  function automatic int num_digits(input int n);
    return n / 3 + 1;
  endfunction

  // Circular left shift of the low n bits of v by r places.
  function automatic word_t rotl(input word_t v, input int n, input int r);
    word_t res;
    int    rr;
    res = '0;
    rr  = r % n;
    for (int b = 0; b < n; b++) res[(b + rr) % n] = v[b];
    return res;
  endfunction

  // Bias B = sum over groups j of 2^(k*j).
  function automatic word_t bias(input int n, input int k);
    word_t res;
    res = '0;
    for (int j = 0; j < n / k; j++) res[k*j] = 1'b1;
    return res;
  endfunction

  // Compensation constant CC = -(sum_i 2^(3i) * B) mod 2^n-1, i over all
  // Booth digits.
  function automatic word_t comp_const(input int n, input int k);
    longint unsigned m, acc;
    word_t b;
    m   = (longint'(1) << n) - 1;
    b   = bias(n, k);
    acc = 0;
    for (int i = 0; i < num_digits(n); i++)
      acc = (acc + longint'(rotl(b, n, 3 * i))) % m;
    return word_t'((m - acc) % m);
  endfunction

  // 1 when the redundancy carry bits of all Booth rows fall on distinct
  // bit positions, so that they can share one operand vector of the
  // carry-save tree. Row i puts carry bit j at position (k*j + 1 + 3*i) mod n.
  function automatic bit q_disjoint(input int n, input int k);
    word_t used, mask;
    used = '0;
    for (int i = 0; i < num_digits(n); i++)
      for (int j = 0; j < n / k; j++) begin
        mask = word_t'(1) << ((k * j + 1 + 3 * i) % n);
        if ((used & mask) != '0) return 1'b0;
        used = used | mask;
      end
    return 1'b1;
  endfunction

  // Number of carry-save tree operands: the partial products, the carry-bit
  // vector(s) and the compensation constant.
  function automatic int num_operands(input int n, input int k);
    return num_digits(n) + (q_disjoint(n, k) ? 1 : num_digits(n)) + 1;
  endfunction

endpackage
