// Testbench of the biased soft multiples B+X, B+2X, B+4X (N=8, K=4, so
// B = 17). For every x it checks the value of each (sum, carry) pair modulo
// 255 against integer arithmetic, and that the sum vector agrees with the
// rotated x everywhere except the bias bits 0 and 4, where it must be
// inverted. Combinational: one time unit per vector.
module tb_soft_multiples;

  localparam int N = 8, M = 2, MOD = 255, B = 17;

  logic [N-1:0] x, s1, s2, s4;
  logic [M-1:0] c1, c2, c4;
  int checks = 0, failures = 0;

  soft_multiples dut (.x(x), .s1(s1), .s2(s2), .s4(s4), .c1(c1), .c2(c2), .c4(c4));

  function automatic int rotl(input int v, input int r);
    return ((v << r) | (v >> (N - r))) & MOD;
  endfunction

  task automatic check(input int m, input int r, input logic [N-1:0] s, input logic [M-1:0] c);
    int v;
    v = int'(s) + (c[0] ? 2 : 0) + (c[1] ? 32 : 0);
    checks++;
    if (v % MOD != (B + m * int'(x)) % MOD) begin
      failures++;
      if (failures < 10) $display("FAIL B+%0dX x=%0d got %0d", m, x, v % MOD);
    end
    checks++;
    if (int'(s) != (rotl(int'(x), r) ^ B)) begin
      failures++;
      if (failures < 10) $display("FAIL B+%0dX x=%0d sum vector %b", m, x, s);
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
    for (int xi = 0; xi < 256; xi++) begin
      x = N'(xi);
      #1;
      check(1, 0, s1, c1);
      check(2, 1, s2, c2);
      check(4, 2, s4, c4);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
