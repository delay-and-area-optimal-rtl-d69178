// fragment_sum: fragment summation unit, the second stage of the BSE
// multiplier block.
//
// Each coefficient C is built from its match: a list of fragments F(S, i),
// symbol S shifted left by i bits, whose sum is C. For coefficient c the unit
// takes the products x*S from the alphabet generation unit, shifts each by
// its fragment's i, and adds them with a multi_operand_adder (carry-save
// Wallace tree, then one carry look-ahead adder). A one-fragment match needs
// no adder. The result is x*C.
//
// The matches arrive as one flat list FRAGS of (coefficient index, symbol,
// shift) records in any order; elaboration-time functions collect the
// fragments of each coefficient and find each symbol in the alphabet.
//
// Interface: sym_prod[NSYM] in (x*S for the alphabet, PW bits), prod[NCOEF]
// out (x*C, PW bits, two's complement). Purely combinational. The two-stage
// structure follows the document; the flat fragment list is this design's
// way of passing a match in.
module fragment_sum
  import bse_pkg::*;
#(
  parameter int unsigned PW             = 32,
  parameter int unsigned NCOEF          = 2,
  parameter int unsigned NSYM           = 2,
  parameter int unsigned ALPHABET[NSYM] = '{1, 9},
  parameter int unsigned NFRAG          = 4,
  parameter frag_t       FRAGS[NFRAG]   = '{'{0, 9, 2}, '{0, 9, 0}, '{1, 9, 1}, '{1, 1, 3}}
) (
  input  logic [PW-1:0] sym_prod [NSYM],
  output logic [PW-1:0] prod     [NCOEF]
);

  // number of fragments in the match of coefficient c
  function automatic int unsigned frag_count(input int unsigned c);
    int unsigned n = 0;
    for (int f = 0; f < NFRAG; f++) if (FRAGS[f].coef == c) n++;
    return n;
  endfunction

  // position in FRAGS of the k-th fragment of coefficient c
  function automatic int unsigned frag_index(input int unsigned c, input int unsigned k);
    int unsigned n = 0;
    for (int f = 0; f < NFRAG; f++) begin
      if (FRAGS[f].coef == c) begin
        if (n == k) return f;
        n++;
      end
    end
    return 0;
  endfunction

  // position of symbol value s in the alphabet (NSYM if absent)
  function automatic int unsigned sym_index(input int unsigned s);
    for (int i = 0; i < NSYM; i++) if (ALPHABET[i] == s) return i;
    return NSYM;
  endfunction

  for (genvar f = 0; f < NFRAG; f++) begin : g_check
    if (sym_index(FRAGS[f].sym) >= NSYM) begin : g_nosym
      $error("fragment_sum: fragment %0d uses symbol %0d, which is not in the alphabet", f, FRAGS[f].sym);
    end
    if (FRAGS[f].coef >= NCOEF) begin : g_nocoef
      $error("fragment_sum: fragment %0d names coefficient %0d of %0d", f, FRAGS[f].coef, NCOEF);
    end
  end

  for (genvar c = 0; c < NCOEF; c++) begin : g_coef
    localparam int unsigned K = frag_count(c);

    if (K == 0) begin : g_empty
      $error("fragment_sum: coefficient %0d has no fragments", c);
    end else begin : g_sum
      logic [PW-1:0] ops [K];
      for (genvar k = 0; k < K; k++) begin : g_op
        localparam int unsigned F  = frag_index(c, k);
        localparam int unsigned SI = sym_index(FRAGS[F].sym);
        assign ops[k] = sym_prod[SI] << FRAGS[F].shift;
      end

      multi_operand_adder #(.K(K), .W(PW)) u_add (
        .ops(ops),
        .sum(prod[c])
      );
    end
  end

endmodule
