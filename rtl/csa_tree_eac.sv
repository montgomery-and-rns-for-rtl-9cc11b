// csa_tree_eac: Wallace tree of end-around-carry CSA rows.
//
// Reduces TERMS W-bit vectors to two vectors (sum_o, carry_o) using csa_eac
// rows (INVERT = 0 for modulo 2^W - 1, INVERT = 1 for diminished-1 modulo
// 2^W + 1). At each level the vectors are taken three at a time, each group
// becoming two, and the one or two left over pass down unchanged, until two
// remain. TERMS - 2 rows are used in all; for 9 terms the levels hold
// 3, 2, 1, 1 rows (the 2^8 + 1 multiplier) and for 8 terms 2, 2, 1, 1 (the
// 2^8 - 1 multiplier). With INVERT = 1 each row adds one to the raw total,
// which is what diminished-1 addition of its three inputs requires.
// Purely combinational. TERMS must be at least 3.
module csa_tree_eac #(
  parameter int unsigned W      = 8,
  parameter int unsigned TERMS  = 9,
  parameter bit          INVERT = 1'b0
) (
  input  logic [W-1:0] terms [TERMS],
  output logic [W-1:0] sum_o,
  output logic [W-1:0] carry_o
);
  // number of vectors at level l
  function automatic int unsigned count_at(int unsigned l);
    int unsigned v = TERMS;
    for (int unsigned i = 0; i < l; i++)
      if (v > 2) v = 2 * (v / 3) + (v % 3);
    return v;
  endfunction

  function automatic int unsigned levels();
    int unsigned v = TERMS, l = 0;
    while (v > 2) begin
      v = 2 * (v / 3) + (v % 3);
      l++;
    end
    return l;
  endfunction

  localparam int unsigned LEVELS = levels();

  // Each level has its own pair of arrays: cur (its inputs) and nxt (its
  // outputs, the next level's inputs).
  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int unsigned V = count_at(l);
    localparam int unsigned G = V / 3;
    logic [W-1:0] cur [TERMS];
    logic [W-1:0] nxt [TERMS];
    if (l == 0) begin : g_first
      assign cur = terms;
    end else begin : g_next
      assign cur = g_lvl[l-1].nxt;
    end
    for (genvar g = 0; g < G; g++) begin : g_csa
      csa_eac #(.W(W), .INVERT(INVERT)) u_csa (
        .x(cur[3*g]), .y(cur[3*g+1]), .z(cur[3*g+2]),
        .sum(nxt[2*g]), .carry(nxt[2*g+1])
      );
    end
    for (genvar r = 0; r < V % 3; r++) begin : g_pass
      assign nxt[2*G+r] = cur[3*G+r];
    end
    for (genvar u = 2 * G + V % 3; u < TERMS; u++) begin : g_unused
      assign nxt[u] = '0;
    end
  end

  assign sum_o   = g_lvl[LEVELS-1].nxt[0];
  assign carry_o = g_lvl[LEVELS-1].nxt[1];
endmodule
