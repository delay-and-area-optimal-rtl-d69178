// fir_bse: transposed-form FIR filter whose coefficient multiplications are
// done by a binary-subexpression-sharing (BSE) multiplier block.
//
//   y[n] = sum_{i=0}^{NTAPS-1} (+/-) COEFS[TAP_COEF[i]] * x[n-i]
//
// Structure: the incoming sample x feeds one mcm_block, which produces x*C
// for every distinct coefficient C with shifts and adders only (alphabet
// generation unit, then fragment summation unit). Each tap picks one of
// these products (TAP_COEF, so symmetric taps share a product) and the
// tap_chain of carry look-ahead adders and delay registers accumulates them
// in transposed form.
//
// The constants are the filter's plan, decided before elaboration:
//   COEFS     the distinct coefficient magnitudes, unsigned, CW bits
//   ALPHABET  the symbols (odd constants) built by the alphabet unit
//   FRAGS     every coefficient's match as (coefficient, symbol, shift)
//   TAP_COEF  which coefficient each tap uses; TAP_NEG taps subtract
// The defaults are the document's working example after optimisation
// (CSA:CPA cost ratio 1:2, timing constraint 4 units): C0 = 45 and C1 = 26
// built from the alphabet {1, 1001}, total cost 6 units, longest path 4
// units. EST_AREA and EST_DELAY give the unit-cost estimate of any plan
// (one CSA = 1, one CPA = CPA_RATIO) for comparison with the optimiser.
//
// Interface and timing: present a signed XW-bit sample on x_in with
// in_valid high; one clock later out_valid is high and y_out holds the
// filter output for that sample. Samples may arrive on any cycle. rst_n is
// asynchronous, active low, and clears the filter state. The multiplier
// block sits between x_in and the delay registers without pipelining.
// The sample width (16 bits), the enable, the reset, the output register
// and the tap sign option are this design's choices.
module fir_bse
  import bse_pkg::*;
#(
  parameter int unsigned XW              = 16,
  parameter int unsigned CW              = 16,
  parameter int unsigned NCOEF           = 2,
  parameter int unsigned COEFS[NCOEF]    = '{45, 26},
  parameter int unsigned NSYM            = 2,
  parameter int unsigned ALPHABET[NSYM]  = '{1, 9},
  parameter int unsigned NFRAG           = 4,
  parameter frag_t       FRAGS[NFRAG]    = '{'{0, 9, 2}, '{0, 9, 0}, '{1, 9, 1}, '{1, 1, 3}},
  parameter int unsigned NTAPS           = 2,
  parameter int unsigned TAP_COEF[NTAPS] = '{0, 1},
  parameter bit          TAP_NEG[NTAPS]  = '{default: 1'b0},
  parameter int unsigned CPA_RATIO       = 2,
  localparam int unsigned PW             = XW + CW,
  localparam int unsigned YW             = PW + $clog2(NTAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [XW-1:0] x_in,
  output logic                 out_valid,
  output logic signed [YW-1:0] y_out
);

  // ---------------------------------------------------------------------
  // unit-cost estimate of the plan
  function automatic int unsigned frag_count(input int unsigned c);
    int unsigned n = 0;
    for (int f = 0; f < NFRAG; f++) if (FRAGS[f].coef == c) n++;
    return n;
  endfunction

  function automatic int unsigned est_area();
    int unsigned a = 0;
    for (int s = 0; s < NSYM; s++) a += sym_area(ALPHABET[s], CPA_RATIO);
    for (int c = 0; c < NCOEF; c++) a += sum_area(frag_count(c), CPA_RATIO);
    return a;
  endfunction

  function automatic int unsigned est_delay();
    int unsigned worst = 0;
    for (int c = 0; c < NCOEF; c++) begin
      int unsigned d = 0;
      for (int f = 0; f < NFRAG; f++)
        if (FRAGS[f].coef == c && sym_delay(FRAGS[f].sym, CPA_RATIO) > d)
          d = sym_delay(FRAGS[f].sym, CPA_RATIO);
      d += sum_delay(frag_count(c), CPA_RATIO);
      if (d > worst) worst = d;
    end
    return worst;
  endfunction

  localparam int unsigned EST_AREA  = est_area();
  localparam int unsigned EST_DELAY = est_delay();

  for (genvar i = 0; i < NTAPS; i++) begin : g_tapcheck
    if (TAP_COEF[i] >= NCOEF) begin : g_bad
      $error("fir_bse: tap %0d names coefficient %0d of %0d", i, TAP_COEF[i], NCOEF);
    end
  end

  // ---------------------------------------------------------------------
  // multiplier block and transposed tap chain
  logic signed [PW-1:0] prod [NCOEF];
  logic signed [PW-1:0] t    [NTAPS];

  mcm_block #(
    .XW      (XW),
    .CW      (CW),
    .PW      (PW),
    .NCOEF   (NCOEF),
    .COEFS   (COEFS),
    .NSYM    (NSYM),
    .ALPHABET(ALPHABET),
    .NFRAG   (NFRAG),
    .FRAGS   (FRAGS)
  ) u_mcm (
    .x   (x_in),
    .prod(prod)
  );

  always_comb
    for (int i = 0; i < NTAPS; i++) t[i] = prod[TAP_COEF[i]];

  tap_chain #(
    .NTAPS  (NTAPS),
    .PW     (PW),
    .YW     (YW),
    .TAP_NEG(TAP_NEG)
  ) u_chain (
    .clk    (clk),
    .rst_n  (rst_n),
    .en     (in_valid),
    .t      (t),
    .y      (y_out),
    .y_valid(out_valid)
  );

endmodule
