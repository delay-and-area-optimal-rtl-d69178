// cla_adder: W-bit carry look-ahead adder, the carry-propagate adder (CPA)
// of the design.
//
// sum = a + b + cin (modulo 2^W), cout is the carry out of the top bit.
// Each bit forms generate g = a&b and propagate p = a^b. Bits are grouped in
// fours; inside a group every carry is written out as a flat sum of products
// of g, p and the group's carry-in (no rippling). Each group also forms a
// group generate/propagate, and the group carry-ins are again expanded as
// flat sums of products over all lower groups and cin, so the carry of every
// bit is computed before, and independently of, the sums.
//
// Purely combinational. The choice of a carry look-ahead adder as CPA follows
// the document (chosen for speed over a ripple-carry adder); its group size
// of four and the flat second level are this design's choices.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int unsigned GS = 4;                 // bits per look-ahead group
  localparam int unsigned NG = (W + GS - 1) / GS; // number of groups

  logic [NG*GS-1:0] g, p;      // bit generate / propagate (padded with zeros)
  logic [NG*GS:0]   c;         // carry into every bit, c[NG*GS] is the top carry
  logic [NG-1:0]    gg, gp;    // group generate / propagate
  logic [NG:0]      gc;        // carry into every group

  always_comb begin
    g = '0;
    p = '0;
    g[W-1:0] = a & b;
    p[W-1:0] = a ^ b;

    // group generate / propagate
    for (int j = 0; j < NG; j++) begin
      logic t;
      gg[j] = 1'b0;
      for (int i = 0; i < GS; i++) begin
        t = g[j*GS+i];
        for (int k = i + 1; k < GS; k++) t = t & p[j*GS+k];
        gg[j] = gg[j] | t;
      end
      gp[j] = &p[j*GS +: GS];
    end

    // second level: carry into group j as a flat sum of products
    for (int j = 0; j <= NG; j++) begin
      logic t;
      t = cin;
      for (int k = 0; k < j; k++) t = t & gp[k];
      gc[j] = t;
      for (int i = 0; i < j; i++) begin
        t = gg[i];
        for (int k = i + 1; k < j; k++) t = t & gp[k];
        gc[j] = gc[j] | t;
      end
    end

    // first level: carry into bit i of group j from the group carry-in
    for (int j = 0; j < NG; j++) begin
      for (int i = 0; i < GS; i++) begin
        logic t;
        t = gc[j];
        for (int k = 0; k < i; k++) t = t & p[j*GS+k];
        c[j*GS+i] = t;
        for (int m = 0; m < i; m++) begin
          t = g[j*GS+m];
          for (int k = m + 1; k < i; k++) t = t & p[j*GS+k];
          c[j*GS+i] = c[j*GS+i] | t;
        end
      end
    end
    c[NG*GS] = gc[NG];

    sum  = p[W-1:0] ^ c[W-1:0];
    cout = c[W];
  end

endmodule
