// Testbench of the radix-8 Booth selector. For every legal select (none or
// exactly one of X, 2X, 3X, 4X), both signs and all 16 combinations of the
// candidate bits it checks pp = sign XOR (selected candidate, or 0).
// Combinational: one time unit per vector.
module tb_booth_selector;

  logic sel_x, sel_2x, sel_3x, sel_4x, sign, m1, m2, m3, m4, pp;
  int checks = 0, failures = 0;

  booth_selector dut (.sel_x(sel_x), .sel_2x(sel_2x), .sel_3x(sel_3x), .sel_4x(sel_4x),
                      .sign(sign), .m1(m1), .m2(m2), .m3(m3), .m4(m4), .pp(pp));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] m;
    logic want;
    for (int sel = 0; sel <= 4; sel++)
      for (int sg = 0; sg < 2; sg++)
        for (int mv = 0; mv < 16; mv++) begin
          m = 4'(mv);
          {sel_4x, sel_3x, sel_2x, sel_x} = (sel == 0) ? 4'b0 : 4'(1 << (sel - 1));
          sign = sg[0];
          {m4, m3, m2, m1} = m;
          #1;
          want = (sel == 0) ? 1'b0 : m[sel-1];
          want = want ^ sg[0];
          checks++;
          if (pp !== want) begin
            failures++;
            $display("FAIL sel=%0d sign=%0d m=%b pp=%b", sel, sg, m, pp);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
