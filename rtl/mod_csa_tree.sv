// Modulo 2^N-1 carry-save adder tree.
//
// Reduces NOPS operand vectors to a sum vector and a carry vector whose
// total equals the total of the operands modulo 2^N-1. Each level groups the
// operands in threes, in order, and passes each group through a row of full
// adders; an operand left over at the end of a level passes to the next
// level unchanged. The carry row of a full-adder row is shifted left by one
// place and its top bit wraps to bit 0, because 2^N = 1 modulo 2^N-1
// (end-around carry). For the default multiplier (5 operands: three partial
// products, the redundancy carry bits and the compensation constant) this
// gives three levels: the partial products first, then the carry bits, then
// the constant. The end-around full-adder rows follow the design; the
// grouping order of a larger operand list is this model's own.
//
// Interface: ops[NOPS] (N bits each) in; sum and carry (N bits) out.
// Combinational.
module mod_csa_tree #(
  parameter int N    = 8,
  parameter int NOPS = 5
) (
  input  logic [N-1:0] ops [NOPS],
  output logic [N-1:0] sum,
  output logic [N-1:0] carry
);

  // Operand count after lvl levels of 3:2 reduction.
  function automatic int count_at(input int lvl);
    int c;
    c = NOPS;
    for (int l = 0; l < lvl; l++) c = (c / 3) * 2 + c % 3;
    return c;
  endfunction

  function automatic int num_levels();
    int c, l;
    c = NOPS;
    l = 0;
    while (c > 2) begin
      c = (c / 3) * 2 + c % 3;
      l++;
    end
    return l;
  endfunction

  localparam int NLVL = num_levels();

  for (genvar l = 0; l < NLVL; l++) begin : g_lvl
    localparam int C  = count_at(l);
    localparam int NG = C / 3;
    localparam int NR = C % 3;
    logic [N-1:0] cur [NOPS];   // operands entering this level
    logic [N-1:0] nxt [NOPS];   // operands leaving it
    if (l == 0) begin : g_first
      assign cur = ops;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar g = 0; g < NG; g++) begin : g_csa
      logic [N-1:0] a, b, c, maj;
      assign a   = cur[3*g];
      assign b   = cur[3*g+1];
      assign c   = cur[3*g+2];
      assign maj = (a & b) | (a & c) | (b & c);
      assign nxt[2*g]   = a ^ b ^ c;
      assign nxt[2*g+1] = {maj[N-2:0], maj[N-1]};
    end
    for (genvar r = 0; r < NR; r++) begin : g_pass
      assign nxt[2*NG+r] = cur[3*NG+r];
    end
    for (genvar u = 2 * NG + NR; u < NOPS; u++) begin : g_unused
      assign nxt[u] = '0;
    end
  end

  if (NLVL == 0) begin : g_direct
    assign sum   = ops[0];
    assign carry = ops[1 % NOPS];
  end else begin : g_out
    assign sum   = g_lvl[NLVL-1].nxt[0];
    assign carry = g_lvl[NLVL-1].nxt[1];
  end

  initial assert (NOPS >= 2) else $error("mod_csa_tree: NOPS must be at least 2");

endmodule
