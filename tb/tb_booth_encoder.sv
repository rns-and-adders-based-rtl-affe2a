// Testbench of the radix-8 Booth encoder. Drives all 16 quartets and compares
// sign and magnitude select with the radix-8 recoding table, written here as
// a literal list of signed digits (quartet 0000 first). Quartet 1111 must
// give sign 1 and no select. Combinational: one time unit per vector.
module tb_booth_encoder;

  logic [3:0] quartet;
  logic sign, sel_x, sel_2x, sel_3x, sel_4x;
  int checks = 0, failures = 0;

  // Signed digit per quartet 0000 .. 1111.
  localparam int TABLE [16] = '{0, 1, 1, 2, 2, 3, 3, 4, -4, -3, -3, -2, -2, -1, -1, 0};

  booth_encoder dut (.quartet(quartet), .sign(sign), .sel_x(sel_x), .sel_2x(sel_2x),
                     .sel_3x(sel_3x), .sel_4x(sel_4x));

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mag;
    logic [3:0] onehot, expect_oh;
    for (int qi = 0; qi < 16; qi++) begin
      quartet = 4'(qi);
      #1;
      mag = TABLE[qi] < 0 ? -TABLE[qi] : TABLE[qi];
      expect_oh = (mag == 0) ? 4'b0000 : 4'(1 << (mag - 1));
      onehot = {sel_4x, sel_3x, sel_2x, sel_x};
      checks++;
      if (onehot != expect_oh) begin
        failures++;
        $display("FAIL quartet %b: selects %b expected %b", quartet, onehot, expect_oh);
      end
      checks++;
      if (sign != quartet[3]) begin
        failures++;
        $display("FAIL quartet %b: sign %b", quartet, sign);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
