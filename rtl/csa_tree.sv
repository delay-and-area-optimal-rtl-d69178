// csa_tree: Wallace tree of carry-save adders that reduces K operands of
// W bits to two (s and c) with the same total modulo 2^W.
//
// Level l (generate block g_level[l]) holds cnt(l) operands. They are taken three at a time into a csa;
// the one or two operands left over pass to the next level unchanged, so
// cnt(l+1) = 2*(cnt(l)/3) + cnt(l)%3. After bse_pkg::csa_levels(K) levels
// two operands remain, and K-2 carry-save adders have been used in total
// (nine operands: 9 -> 6 -> 4 -> 3 -> 2, four levels, seven adders).
// With K = 1 the second output is zero; with K = 2 both pass straight through.
//
// Purely combinational. Reducing many operands with CSAs before a single CPA
// follows the document; the Wallace grouping is this design's choice.
module csa_tree
  import bse_pkg::*;
#(
  parameter int unsigned K = 3,
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] ops [K],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  localparam int unsigned L = csa_levels(K);

  // operand count at level l
  function automatic int unsigned cnt(input int unsigned l);
    int unsigned n = K;
    for (int unsigned i = 0; i < l; i++) n = 2 * (n / 3) + (n % 3);
    return n;
  endfunction

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int unsigned N  = cnt(l);
    localparam int unsigned G  = N / 3;
    localparam int unsigned R  = N % 3;
    localparam int unsigned NN = 2 * G + R;

    logic [W-1:0] cur [N];    // operands entering this level
    logic [W-1:0] nxt [NN];   // operands leaving it

    if (l == 0) begin : g_first
      assign cur = ops;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end

    for (genvar g = 0; g < G; g++) begin : g_csa
      csa #(.W(W)) u_csa (
        .x    (cur[3*g]),
        .y    (cur[3*g+1]),
        .z    (cur[3*g+2]),
        .sum  (nxt[2*g]),
        .carry(nxt[2*g+1])
      );
    end
    for (genvar r = 0; r < R; r++) begin : g_pass
      assign nxt[2*G+r] = cur[3*G+r];
    end
  end

  if (K == 1) begin : g_one
    assign s = ops[0];
    assign c = '0;
  end else if (K == 2) begin : g_two
    assign s = ops[0];
    assign c = ops[1];
  end else begin : g_out
    assign s = g_level[L-1].nxt[0];
    assign c = g_level[L-1].nxt[1];
  end

endmodule
