// wallace_tree: carry-save reduction of ROWS addends to a sum and a carry row.
//
// The tree is built level by level. At each level the rows are taken three at
// a time and each group goes through one csa_row (a row of unit adders), which
// turns three rows into two; the one or two rows left over pass to the next
// level unchanged. The number of rows therefore falls as n -> 2*(n/3) + n%3
// until two remain, with no carry propagating anywhere in the tree. For the
// 8x8 multiplier (four partial product rows plus the row of negation bits,
// ROWS = 5) this takes three levels of unit adders: 5 -> 4 -> 3 -> 2.
// All rows are W bits wide and already sign-extended and shifted into place;
// the arithmetic is modulo 2^W. The grouping (rows in their given order) is
// this design's own choice. Combinational.
module wallace_tree #(
  parameter int unsigned ROWS = 5,
  parameter int unsigned W    = 16
) (
  input  logic [W-1:0] rows [ROWS],
  output logic [W-1:0] sum,
  output logic [W-1:0] carry
);

  function automatic int unsigned next_rows(int unsigned n);
    return (n / 3) * 2 + n % 3;
  endfunction

  function automatic int unsigned rows_at(int unsigned level);
    int unsigned n = ROWS;
    for (int unsigned i = 0; i < level; i++) n = next_rows(n);
    return n;
  endfunction

  function automatic int unsigned num_levels(int unsigned n);
    int unsigned l = 0;
    while (n > 2) begin
      n = next_rows(n);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = num_levels(ROWS);

  if (ROWS < 2) begin : g_bad_rows
    $error("wallace_tree needs at least two rows");
  end

  if (LEVELS == 0) begin : g_no_tree
    assign sum   = rows[0];
    assign carry = rows[1];
  end else begin : g_tree
    for (genvar L = 0; L < LEVELS; L++) begin : g_level
      localparam int unsigned N = rows_at(L);
      localparam int unsigned G = N / 3;
      localparam int unsigned M = next_rows(N);

      // cur: rows entering this level, nxt: rows leaving it (first M used).
      logic [W-1:0] cur [ROWS];
      logic [W-1:0] nxt [ROWS];

      if (L == 0) begin : g_first
        assign cur = rows;
      end else begin : g_chain
        assign cur = g_level[L-1].nxt;
      end

      for (genvar g = 0; g < G; g++) begin : g_csa
        csa_row #(.W(W)) u_csa (
          .a (cur[3*g]),
          .b (cur[3*g+1]),
          .c (cur[3*g+2]),
          .s (nxt[2*g]),
          .cy(nxt[2*g+1])
        );
      end

      for (genvar k = 0; k < N % 3; k++) begin : g_pass
        assign nxt[2*G+k] = cur[3*G+k];
      end

      for (genvar k = M; k < ROWS; k++) begin : g_unused
        assign nxt[k] = '0;
      end
    end

    assign sum   = g_level[LEVELS-1].nxt[0];
    assign carry = g_level[LEVELS-1].nxt[1];
  end

endmodule
