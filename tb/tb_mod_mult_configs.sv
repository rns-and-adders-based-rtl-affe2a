// Testbench of the multiplier at other sizes. The width K of the ripple-carry
// adders of the hard multiple sets the multiplier's delay, so the design is
// a family over K; this runs it for N=8 with K = 1, 2 and 8 (exhaustively),
// and for N=12 with K = 3, 4 and 6 and N=16 with K = 4 and 8 on random
// operands. N=12 has a fourth Booth digit and, for K=3, colliding
// redundancy carry bits that the carry-save tree takes as separate vectors.
// Every product is compared with (x*y) mod (2^N-1) computed in integers; all
// ones is accepted for zero. Combinational: one time unit per vector.
module tb_mod_mult_configs;

  logic [7:0]  x8, y8, p8k1, p8k2, p8k8;
  logic [11:0] x12, y12, p12k3, p12k4, p12k6;
  logic [15:0] x16, y16, p16k4, p16k8;
  int checks = 0, failures = 0;

  mod_mult_radix8 #(.N(8),  .K(1)) u8k1  (.x(x8),  .y(y8),  .p(p8k1));
  mod_mult_radix8 #(.N(8),  .K(2)) u8k2  (.x(x8),  .y(y8),  .p(p8k2));
  mod_mult_radix8 #(.N(8),  .K(8)) u8k8  (.x(x8),  .y(y8),  .p(p8k8));
  mod_mult_radix8 #(.N(12), .K(3)) u12k3 (.x(x12), .y(y12), .p(p12k3));
  mod_mult_radix8 #(.N(12), .K(4)) u12k4 (.x(x12), .y(y12), .p(p12k4));
  mod_mult_radix8 #(.N(12), .K(6)) u12k6 (.x(x12), .y(y12), .p(p12k6));
  mod_mult_radix8 #(.N(16), .K(4)) u16k4 (.x(x16), .y(y16), .p(p16k4));
  mod_mult_radix8 #(.N(16), .K(8)) u16k8 (.x(x16), .y(y16), .p(p16k8));

  task automatic cmp(input string name, input longint got, input longint xv, input longint yv,
                     input int n);
    longint m, want;
    m = (longint'(1) << n) - 1;
    want = (xv * yv) % m;
    checks++;
    if (!(got == want || (want == 0 && got == m))) begin
      failures++;
      if (failures < 10) $display("FAIL %s x=%0d y=%0d got %0d expected %0d", name, xv, yv, got, want);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        x8 = 8'(a);  y8 = 8'(b);
        x12 = 12'($urandom); y12 = 12'($urandom);
        x16 = 16'($urandom); y16 = 16'($urandom);
        #1;
        cmp("N=8 K=1", longint'(p8k1), longint'(a), longint'(b), 8);
        cmp("N=8 K=2", longint'(p8k2), longint'(a), longint'(b), 8);
        cmp("N=8 K=8", longint'(p8k8), longint'(a), longint'(b), 8);
        if ((b & 3) == 0) begin
          cmp("N=12 K=3", longint'(p12k3), longint'(x12), longint'(y12), 12);
          cmp("N=12 K=4", longint'(p12k4), longint'(x12), longint'(y12), 12);
          cmp("N=12 K=6", longint'(p12k6), longint'(x12), longint'(y12), 12);
          cmp("N=16 K=4", longint'(p16k4), longint'(x16), longint'(y16), 16);
          cmp("N=16 K=8", longint'(p16k8), longint'(x16), longint'(y16), 16);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
