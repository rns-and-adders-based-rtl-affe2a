// Testbench of the modulo 2^N-1 carry-save tree. Random operands are applied
// to instances with N=8 and 5 operands (default), N=8 and 7 operands, and
// N=11 and 4 operands; each time sum + carry must equal the sum of the
// operands modulo 2^N-1. A few all-ones and all-zero corner vectors are
// applied too. Combinational: one time unit per vector.
module tb_mod_csa_tree;

  logic [7:0]  o5 [5];
  logic [7:0]  o7 [7];
  logic [10:0] o4 [4];
  logic [7:0]  s5, c5, s7, c7;
  logic [10:0] s4, c4;
  int checks = 0, failures = 0;

  mod_csa_tree dut5 (.ops(o5), .sum(s5), .carry(c5));
  mod_csa_tree #(.N(8), .NOPS(7)) dut7 (.ops(o7), .sum(s7), .carry(c7));
  mod_csa_tree #(.N(11), .NOPS(4)) dut4 (.ops(o4), .sum(s4), .carry(c4));

  task automatic cmp(input string name, input longint got, input longint want, input longint m);
    checks++;
    if (got % m != want % m) begin
      failures++;
      if (failures < 10) $display("FAIL %s got %0d expected %0d", name, got % m, want % m);
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
    longint t5, t7, t4;
    for (int n = 0; n < 20000; n++) begin
      foreach (o5[i]) o5[i] = (n < 2) ? {8{n[0]}} : 8'($urandom);
      foreach (o7[i]) o7[i] = (n < 2) ? {8{n[0]}} : 8'($urandom);
      foreach (o4[i]) o4[i] = (n < 2) ? {11{n[0]}} : 11'($urandom);
      #1;
      t5 = 0; t7 = 0; t4 = 0;
      foreach (o5[i]) t5 += longint'(o5[i]);
      foreach (o7[i]) t7 += longint'(o7[i]);
      foreach (o4[i]) t4 += longint'(o4[i]);
      cmp("N=8 NOPS=5", longint'(s5) + longint'(c5), t5, 255);
      cmp("N=8 NOPS=7", longint'(s7) + longint'(c7), t7, 255);
      cmp("N=11 NOPS=4", longint'(s4) + longint'(c4), t4, 2047);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
