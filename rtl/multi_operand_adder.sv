// multi_operand_adder: adds K operands of W bits (modulo 2^W).
//
// The operands are first reduced to two by a Wallace tree of carry-save
// adders (csa_tree), then one carry look-ahead adder (cla_adder) forms the
// final sum. This is the adder structure used everywhere in the multiplier
// block: K-2 CSAs plus one CPA, with csa_levels(K) CSA delays plus one CPA
// delay on the longest path. With K = 2 it is a single CPA; with K = 1 no
// adder is built and the operand is passed on (a one-bit symbol or a
// single-fragment match costs nothing).
//
// Purely combinational. Interface: ops[K] in, sum out.
module multi_operand_adder #(
  parameter int unsigned K = 3,
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] ops [K],
  output logic [W-1:0] sum
);

  if (K == 1) begin : g_bypass
    assign sum = ops[0];
  end else begin : g_add
    logic [W-1:0] s, c;
    logic         unused_cout;

    csa_tree #(.K(K), .W(W)) u_tree (
      .ops(ops),
      .s  (s),
      .c  (c)
    );

    cla_adder #(.W(W)) u_cpa (
      .a   (s),
      .b   (c),
      .cin (1'b0),
      .sum (sum),
      .cout(unused_cout)
    );
  end

endmodule
