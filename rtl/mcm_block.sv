// mcm_block: multiplier-less multiple constant multiplication by binary
// subexpression sharing (BSE).
//
// Computes x*C for every coefficient C of the filter with shifts and adders
// only, in two stages:
//   1. alphabet_gen forms x*S for every symbol S of the alphabet (a small
//      set of odd constants shared by all coefficients);
//   2. fragment_sum forms each x*C as the sum of shifted symbol products
//      given by C's match.
// Sharing comes from several coefficients (and several fragments of one
// coefficient) reusing the same symbol products.
//
// The alphabet and the matches are chosen beforehand by a delay/area
// optimiser and passed in as parameters. At elaboration the block checks
// that every match is a valid one: its fragments sum to the coefficient and
// use exactly NZB(C) non-zero bits, and each coefficient fits in CW bits.
// The default plan is the document's two-coefficient working example:
// C0 = 101101 (45) = F(1001,2) + F(1001,0), C1 = 011010 (26) = F(1001,1) +
// F(1,3), with alphabet {1, 1001}.
//
// Interface: x signed XW bits in, prod[NCOEF] = x*COEFS[i] signed PW bits
// out. Purely combinational.
module mcm_block
  import bse_pkg::*;
#(
  parameter int unsigned XW             = 16,
  parameter int unsigned CW             = 16,
  parameter int unsigned PW             = XW + CW,
  parameter int unsigned NCOEF          = 2,
  parameter int unsigned COEFS[NCOEF]   = '{45, 26},
  parameter int unsigned NSYM           = 2,
  parameter int unsigned ALPHABET[NSYM] = '{1, 9},
  parameter int unsigned NFRAG          = 4,
  parameter frag_t       FRAGS[NFRAG]   = '{'{0, 9, 2}, '{0, 9, 0}, '{1, 9, 1}, '{1, 1, 3}}
) (
  input  logic signed [XW-1:0] x,
  output logic signed [PW-1:0] prod [NCOEF]
);

  // value a match builds, and the non-zero bits it uses
  function automatic longint unsigned match_value(input int unsigned c);
    longint unsigned v = 0;
    for (int f = 0; f < NFRAG; f++)
      if (FRAGS[f].coef == c) v += longint'(FRAGS[f].sym) << FRAGS[f].shift;
    return v;
  endfunction

  function automatic int unsigned match_nzb(input int unsigned c);
    int unsigned n = 0;
    for (int f = 0; f < NFRAG; f++)
      if (FRAGS[f].coef == c) n += nzb(FRAGS[f].sym);
    return n;
  endfunction

  for (genvar c = 0; c < NCOEF; c++) begin : g_check
    if (match_value(c) != longint'(COEFS[c])) begin : g_sum
      $error("mcm_block: fragments of coefficient %0d add up to %0d, not %0d",
             c, match_value(c), COEFS[c]);
    end
    if (match_nzb(c) != nzb(COEFS[c])) begin : g_nzb
      $error("mcm_block: fragments of coefficient %0d use %0d non-zero bits, the coefficient has %0d",
             c, match_nzb(c), nzb(COEFS[c]));
    end
    if (bit_len(COEFS[c]) > CW) begin : g_cw
      $error("mcm_block: coefficient %0d (%0d) is wider than CW=%0d", c, COEFS[c], CW);
    end
  end

  logic [PW-1:0] sym_prod [NSYM];
  logic [PW-1:0] prod_u   [NCOEF];

  alphabet_gen #(
    .XW      (XW),
    .PW      (PW),
    .NSYM    (NSYM),
    .ALPHABET(ALPHABET)
  ) u_alphabet (
    .x       (x),
    .sym_prod(sym_prod)
  );

  fragment_sum #(
    .PW      (PW),
    .NCOEF   (NCOEF),
    .NSYM    (NSYM),
    .ALPHABET(ALPHABET),
    .NFRAG   (NFRAG),
    .FRAGS   (FRAGS)
  ) u_fragments (
    .sym_prod(sym_prod),
    .prod    (prod_u)
  );

  always_comb
    for (int c = 0; c < NCOEF; c++) prod[c] = signed'(prod_u[c]);

endmodule
