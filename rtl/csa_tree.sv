// csa_tree: carry-save adder tree reducing N operands of W bits to two words
// (sum and carry) whose sum, modulo 2^W, equals the sum of the operands.
//
// The tree is built level by level in Wallace order: at every level the
// operands are taken in groups of three, each group goes through a row of
// 3:2 counters (full adders, no carry propagation) giving a sum word and a
// carry word shifted left by one, and the one or two operands left over
// pass to the next level unchanged. Levels repeat until two words remain.
// The depth is therefore about log1.5(N/2) full-adder delays. The source
// design names the CSA tree as the accumulator of the partial products; its
// Wallace arrangement is this design's choice. Purely combinational.
module csa_tree #(
  parameter int unsigned N = 5,    // number of operands (>= 1)
  parameter int unsigned W = 32    // operand width
) (
  input  logic [W-1:0] ops [N],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  // Operand count after one level of 3:2 reduction.
  function automatic int unsigned next_count(int unsigned c);
    return (c > 2) ? 2 * (c / 3) + (c % 3) : c;
  endfunction

  // Operand count after l levels.
  function automatic int unsigned count_at(int unsigned l);
    int unsigned c = N;
    for (int unsigned i = 0; i < l; i++) c = next_count(c);
    return c;
  endfunction

  function automatic int unsigned num_levels();
    int unsigned c = N;
    int unsigned l = 0;
    while (c > 2) begin
      c = next_count(c);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels();

  if (LEVELS == 0) begin : g_none
    assign sum   = ops[0];
    assign carry = (N > 1) ? ops[N > 1 ? 1 : 0] : '0;
  end else begin : g_tree
    for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
      localparam int unsigned C  = count_at(l);
      localparam int unsigned G  = C / 3;
      localparam int unsigned R  = C % 3;
      localparam int unsigned CN = count_at(l + 1);
      logic [W-1:0] cur [N];
      logic [W-1:0] nxt [N];
      if (l == 0) begin : g_src
        assign cur = ops;
      end else begin : g_src
        assign cur = g_lvl[l-1].nxt;
      end
      for (genvar g = 0; g < G; g++) begin : g_csa
        assign nxt[2*g]   = cur[3*g] ^ cur[3*g+1] ^ cur[3*g+2];
        assign nxt[2*g+1] = ((cur[3*g] & cur[3*g+1]) | (cur[3*g] & cur[3*g+2]) |
                             (cur[3*g+1] & cur[3*g+2])) << 1;
      end
      for (genvar r = 0; r < R; r++) begin : g_pass
        assign nxt[2*G+r] = cur[3*G+r];
      end
      for (genvar u = CN; u < N; u++) begin : g_unused
        assign nxt[u] = '0;
      end
    end
    assign sum   = g_lvl[LEVELS-1].nxt[0];
    assign carry = g_lvl[LEVELS-1].nxt[1];
  end

endmodule
