// Testbench of the end-around carry-lookahead modulo 2^N-1 adder. For N=8 it
// applies all 65536 operand pairs and compares with one's-complement addition
// done in integers: t = a+b, result t-255 when t > 255, else t (so 255 stays
// all ones). It also runs a 5-bit instance exhaustively, and a 13-bit one on
// random pairs. Combinational: one time unit per vector.
module tb_mod_adder_cla;

  logic [7:0]  a8, b8, s8;
  logic [4:0]  a5, b5, s5;
  logic [12:0] a13, b13, s13;
  int checks = 0, failures = 0;

  mod_adder_cla dut8 (.a(a8), .b(b8), .s(s8));
  mod_adder_cla #(.N(5))  dut5 (.a(a5), .b(b5), .s(s5));
  mod_adder_cla #(.N(13)) dut13 (.a(a13), .b(b13), .s(s13));

  function automatic int eac(input int a, input int b, input int n);
    int t, m;
    m = (1 << n) - 1;
    t = a + b;
    return (t > m) ? t - m : t;
  endfunction

  task automatic cmp(input string name, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", name, got, want);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a5 = '0; b5 = '0; a13 = '0; b13 = '0;
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        a8 = 8'(a); b8 = 8'(b);
        a5 = 5'(a); b5 = 5'(b);
        a13 = 13'($urandom); b13 = 13'($urandom);
        #1;
        cmp("N=8", int'(s8), eac(a, b, 8));
        if (a < 32 && b < 32) cmp("N=5", int'(s5), eac(a, b, 5));
        if ((b & 7) == 0) cmp("N=13", int'(s13), eac(int'(a13), int'(b13), 13));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
