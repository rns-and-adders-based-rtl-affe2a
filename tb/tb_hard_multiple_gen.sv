// Testbench of the biased hard-multiple generator.
//
// For N=8 and the adder widths K = 4 (default), 2, 8 and 1 it applies every
// x and checks, against integer arithmetic, that
//   s + sum_j c[j] * 2^(K*j+1) = B + 3x  (mod 255),
// with B = sum_j 2^(K*j). It also checks the carry bit of each group against
// the carry out of the K-bit sum below it, computed independently, so that
// the limit of K bits on every carry chain is verified, not just the value.
// Combinational: one time unit per vector.
module tb_hard_multiple_gen;

  localparam int N   = 8;
  localparam int MOD = (1 << N) - 1;

  logic [N-1:0] x;
  logic [N-1:0] s4, s2, s8, s1;
  logic [1:0]   c4;
  logic [3:0]   c2;
  logic [0:0]   c8;
  logic [7:0]   c1;

  int checks = 0, failures = 0;

  hard_multiple_gen dut4 (.x(x), .s(s4), .c(c4));
  hard_multiple_gen #(.N(N), .K(2)) dut2 (.x(x), .s(s2), .c(c2));
  hard_multiple_gen #(.N(N), .K(8)) dut8 (.x(x), .s(s8), .c(c8));
  hard_multiple_gen #(.N(N), .K(1)) dut1 (.x(x), .s(s1), .c(c1));

  function automatic int rot1(input int v);
    return ((v << 1) | (v >> (N - 1))) & MOD;
  endfunction

  // Value of a (sum, carry-bits) pair modulo 255.
  function automatic int value(input int s, input int c, input int k);
    int v;
    v = s;
    for (int j = 0; j < N / k; j++)
      if (((c >> j) & 1) != 0) v += 1 << ((k * j + 1) % N);
    return v % MOD;
  endfunction

  // Expected carry bit of group j: OR of the group's bottom sum bit and the
  // carry out of the K-bit addition of the group below.
  function automatic int exp_carry(input int xv, input int k, input int j);
    int m, jb, lo, a, b, cout, sbit;
    m   = N / k;
    jb  = (j + m - 1) % m;
    a   = (xv >> (k * jb)) & ((1 << k) - 1);
    b   = (rot1(xv) >> (k * jb)) & ((1 << k) - 1);
    cout = ((a + b) >> k) & 1;
    a   = (xv >> (k * j)) & 1;
    b   = (rot1(xv) >> (k * j)) & 1;
    sbit = (a + b) & 1;
    lo  = sbit | cout;
    return lo;
  endfunction

  function automatic int biasv(input int k);
    int b;
    b = 0;
    for (int j = 0; j < N / k; j++) b += 1 << (k * j);
    return b;
  endfunction

  task automatic check(input string name, input int k, input int s, input int c);
    int expv;
    expv = (biasv(k) + 3 * int'(x)) % MOD;
    checks++;
    if (value(s, c, k) != expv) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d value=%0d expected %0d", name, x, value(s, c, k), expv);
    end
    for (int j = 0; j < N / k; j++) begin
      checks++;
      if (((c >> j) & 1) != exp_carry(int'(x), k, j)) begin
        failures++;
        if (failures < 10) $display("FAIL %s x=%0d carry %0d", name, x, j);
      end
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int xi = 0; xi < (1 << N); xi++) begin
      x = N'(xi);
      #1;
      check("K=4", 4, int'(s4), int'(c4));
      check("K=2", 2, int'(s2), int'(c2));
      check("K=8", 8, int'(s8), int'(c8));
      check("K=1", 1, int'(s1), int'(c1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
