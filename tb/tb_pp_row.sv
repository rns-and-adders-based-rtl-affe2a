// Testbench of the partial product rows (N=8, K=4, B=17), rows 0, 1 and 2.
//
// The biased multiples B+mX are built here in integer arithmetic: B+X, B+2X,
// B+4X by rotating x and moving the bits at positions 0 and 4 into carry
// bits, B+3X by two separate 4-bit additions whose carries are merged with
// the bias bits. For every x and all 16 quartets each row must give
//   pp + q = 8^i * (B + d*x)  (mod 255),
// d being the quartet's signed digit, and q may be 1 only at positions
// (4j + 1 + 3i) mod 8. Combinational: one time unit per vector.
module tb_pp_row;

  localparam int N = 8, M = 2, MOD = 255, B = 17;

  logic [3:0]   quartet;
  logic [N-1:0] s1, s2, s3, s4;
  logic [M-1:0] c1, c2, c3, c4;
  logic [N-1:0] pp [3];
  logic [N-1:0] q  [3];
  int checks = 0, failures = 0;

  pp_row #(.IDX(0)) dut0 (.quartet(quartet), .s1(s1), .s2(s2), .s3(s3), .s4(s4),
                          .c1(c1), .c2(c2), .c3(c3), .c4(c4), .pp(pp[0]), .q(q[0]));
  pp_row #(.IDX(1)) dut1 (.quartet(quartet), .s1(s1), .s2(s2), .s3(s3), .s4(s4),
                          .c1(c1), .c2(c2), .c3(c3), .c4(c4), .pp(pp[1]), .q(q[1]));
  pp_row #(.IDX(2)) dut2 (.quartet(quartet), .s1(s1), .s2(s2), .s3(s3), .s4(s4),
                          .c1(c1), .c2(c2), .c3(c3), .c4(c4), .pp(pp[2]), .q(q[2]));

  function automatic int rotl(input int v, input int r);
    return ((v << r) | (v >> (N - r))) & MOD;
  endfunction

  task automatic make_inputs(input int xv);
    int v, lo, hi, lo2, hi2, sl, sh;
    logic cl, ch;
    v = rotl(xv, 0); s1 = N'(v ^ B); c1 = {v[4], v[0]};
    v = rotl(xv, 1); s2 = N'(v ^ B); c2 = {v[4], v[0]};
    v = rotl(xv, 2); s4 = N'(v ^ B); c4 = {v[4], v[0]};
    // 3x = x + rot(x,1) in two 4-bit halves.
    lo  = xv & 15;           hi  = (xv >> 4) & 15;
    lo2 = rotl(xv, 1) & 15;  hi2 = (rotl(xv, 1) >> 4) & 15;
    sl  = lo + lo2;          sh  = hi + hi2;
    cl  = sh[4];             // carry of upper half wraps into bit 0
    ch  = sl[4];             // carry of lower half enters bit 4
    s3  = N'(((sh & 15) << 4) | (sl & 15));
    s3[0] = ~(sl[0] ^ cl);
    s3[4] = ~(sh[0] ^ ch);
    c3  = {sh[0] | ch, sl[0] | cl};
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d, expv, got, allowed;
    for (int xi = 0; xi < 256; xi++)
      for (int qi = 0; qi < 16; qi++) begin
        make_inputs(xi);
        quartet = 4'(qi);
        #1;
        d = -4 * qi[3] + 2 * qi[2] + qi[1] + qi[0];
        for (int i = 0; i < 3; i++) begin
          expv = ((B + d * xi) % MOD + MOD) % MOD;
          expv = (expv * (1 << (3 * i))) % MOD;
          got  = (int'(pp[i]) + int'(q[i])) % MOD;
          checks++;
          if (got != expv) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d x=%0d quartet=%b got %0d expected %0d",
                                        i, xi, quartet, got, expv);
          end
          allowed = (1 << ((1 + 3 * i) % N)) | (1 << ((5 + 3 * i) % N));
          checks++;
          if ((int'(q[i]) & ~allowed) != 0) begin
            failures++;
            if (failures < 10) $display("FAIL row %0d carry bits misplaced: %b", i, q[i]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
