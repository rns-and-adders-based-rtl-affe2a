// End-to-end testbench of the radix-8 Booth modulo 2^8-1 multiplier at its
// default parameters (N=8, K=4).
//
// Applies all 65536 pairs (x, y) and checks p = x*y mod 255, with the all-ones
// code accepted as zero only when the true residue is zero. The reference is
// plain integer arithmetic. It also counts how often each mechanism of the
// design is exercised and fails if one never is: every Booth digit value
// from -4 to +4, the "-0" quartet 1111, the hard multiple 3X with both signs,
// redundancy carry bits reaching the carry-save tree, the end-around carry
// of the final adder, and zero produced in its all-ones code. The multiplier
// is combinational; each vector is checked 1 time unit after it is applied.
module tb_mod_mult_radix8;

  localparam int N  = 8;
  localparam int MOD = (1 << N) - 1;
  localparam int ND = N / 3 + 1;

  logic [N-1:0] x, y, p;
  int checks = 0, failures = 0;

  mod_mult_radix8 dut (.x(x), .y(y), .p(p));

  // Mechanism counters.
  int digit_seen [-4:4];
  int minus_zero = 0, hard_pos = 0, hard_neg = 0;
  int qbits_used = 0, eac_used = 0, zero_ones = 0;

  // Booth digit i of y, worked out from the definition.
  function automatic int digit(input logic [N-1:0] yy, input int i);
    logic [3*ND+1:0] ye;
    ye = '0;
    ye[N:1] = yy;
    return -4 * int'(ye[3*i+3]) + 2 * int'(ye[3*i+2]) + int'(ye[3*i+1]) + int'(ye[3*i]);
  endfunction

  function automatic logic [3:0] quartet(input logic [N-1:0] yy, input int i);
    logic [3*ND+1:0] ye;
    ye = '0;
    ye[N:1] = yy;
    return ye[3*i +: 4];
  endfunction

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv, d, sum;
    foreach (digit_seen[v]) digit_seen[v] = 0;
    for (int xi = 0; xi < (1 << N); xi++) begin
      for (int yi = 0; yi < (1 << N); yi++) begin
        x = N'(xi);
        y = N'(yi);
        #1;
        expv = (xi * yi) % MOD;
        checks++;
        if (!((int'(p) == expv) || (expv == 0 && int'(p) == MOD))) begin
          failures++;
          if (failures < 10)
            $display("FAIL x=%0d y=%0d p=%0d expected %0d", xi, yi, p, expv);
        end
        // The digits must reconstruct y (independent check of the recoding).
        sum = 0;
        for (int i = 0; i < ND; i++) begin
          d = digit(y, i);
          sum += d * (1 << (3 * i));
          digit_seen[d]++;
          if (quartet(y, i) == 4'b1111) minus_zero++;
          if (d == 3)  hard_pos++;
          if (d == -3) hard_neg++;
        end
        if (sum != yi) begin
          failures++;
          $display("FAIL recoding of y=%0d", yi);
        end
        if (dut.ops[ND] != '0) qbits_used++;
        if (dut.u_cpa.cy[N-1]) eac_used++;
        if (int'(p) == MOD) zero_ones++;
      end
    end
    for (int v = -4; v <= 4; v++) begin
      checks++;
      if (digit_seen[v] == 0) begin
        failures++;
        $display("FAIL digit %0d never used", v);
      end
    end
    $display("mechanisms: -0 quartet %0d, +3X %0d, -3X %0d, carry bits %0d, end-around carry %0d, zero as ones %0d",
             minus_zero, hard_pos, hard_neg, qbits_used, eac_used, zero_ones);
    checks += 6;
    if (minus_zero == 0) failures++;
    if (hard_pos == 0)   failures++;
    if (hard_neg == 0)   failures++;
    if (qbits_used == 0) failures++;
    if (eac_used == 0)   failures++;
    if (zero_ones == 0)  failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
