// alphabet_gen: alphabet generation unit, the first stage of the BSE
// multiplier block.
//
// For every symbol S of the alphabet (an odd constant such as 1001 = 9) it
// forms x*S by adding one copy of x, shifted by the bit position, for each 1
// of S. The NZB(S) shifted copies go through a multi_operand_adder: carry-save
// adders reduce them to two and one carry look-ahead adder produces x*S. A
// symbol with a single 1 (S = 1) needs no adder: x is passed on unchanged.
// Unit cost per symbol is therefore (NZB(S)-2) CSAs plus one CPA.
//
// Interface: x is a signed XW-bit sample; sym_prod[s] is x*ALPHABET[s] as a
// signed PW-bit value (PW must hold XW plus the width of the largest symbol).
// Purely combinational. The structure follows the document; the operand
// order and the sign extension of x to PW bits are this design's choices.
module alphabet_gen
  import bse_pkg::*;
#(
  parameter int unsigned XW             = 16,
  parameter int unsigned PW             = 32,
  parameter int unsigned NSYM           = 2,
  parameter int unsigned ALPHABET[NSYM] = '{1, 9}
) (
  input  logic signed [XW-1:0] x,
  output logic        [PW-1:0] sym_prod [NSYM]
);

  logic [PW-1:0] x_ext;
  assign x_ext = {{(PW-XW){x[XW-1]}}, x};

  for (genvar s = 0; s < NSYM; s++) begin : g_sym
    localparam int unsigned S = ALPHABET[s];
    localparam int unsigned K = nzb(S);

    if (S % 2 != 1) begin : g_bad
      $error("alphabet_gen: symbol %0d is not odd", S);
    end
    if (bit_len(S) + XW > PW) begin : g_wide
      $error("alphabet_gen: symbol %0d does not fit in PW=%0d bits", S, PW);
    end

    logic [PW-1:0] ops [K];
    for (genvar k = 0; k < K; k++) begin : g_op
      assign ops[k] = x_ext << set_bit_pos(S, k);
    end

    multi_operand_adder #(.K(K), .W(PW)) u_add (
      .ops(ops),
      .sum(sym_prod[s])
    );
  end

endmodule
