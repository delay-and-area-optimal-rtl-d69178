// tap_chain: structural adders and delay registers of a transposed-form FIR
// filter.
//
// Tap i receives the product t_i = C_i*x[n] from the multiplier block. The
// chain keeps NTAPS-1 partial sums r_i and on every accepted sample does
//     r_i <= t_{i+1} + r_{i+1}   (r_{NTAPS-1} taken as 0)
//     y   <= t_0 + r_0
// so that y[n] = sum_i C_i * x[n-i]. A tap flagged in TAP_NEG subtracts its
// product instead (adder with inverted operand and carry-in 1), which lets
// a filter with negative coefficients use the positive constants the
// multiplier block produces. Every structural adder is a carry look-ahead
// adder.
//
// Timing: en marks a valid input sample; the registers advance only then.
// y and y_valid are registered, so y holds y[n] in the cycle after the
// sample x[n] was presented with en high (latency one clock). rst_n is an
// asynchronous active-low reset that clears all partial sums and y.
// The transposed structure follows the document; the subtract option, the
// enable, the reset and the output register are this design's choices.
module tap_chain #(
  parameter int unsigned NTAPS         = 2,
  parameter int unsigned PW            = 32,
  parameter int unsigned YW            = PW + $clog2(NTAPS),
  parameter bit          TAP_NEG[NTAPS] = '{default: 1'b0}
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic signed [PW-1:0] t [NTAPS],
  output logic signed [YW-1:0] y,
  output logic                 y_valid
);

  logic [YW-1:0] acc_in  [NTAPS];   // partial sum entering tap i's adder
  logic [YW-1:0] acc_out [NTAPS];   // tap i's adder output
  logic [YW-1:0] r       [NTAPS];   // delay registers; r[NTAPS-1] is unused

  for (genvar i = 0; i < NTAPS; i++) begin : g_tap
    logic [YW-1:0] t_ext;
    logic          unused_cout;

    assign t_ext     = YW'(t[i]);   // sign extension of the signed product
    assign acc_in[i] = (i == NTAPS - 1) ? '0 : r[i];

    cla_adder #(.W(YW)) u_add (
      .a   (acc_in[i]),
      .b   (TAP_NEG[i] ? ~t_ext : t_ext),
      .cin (TAP_NEG[i]),
      .sum (acc_out[i]),
      .cout(unused_cout)
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) r[i] <= '0;
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      y_valid <= en;
      if (en) begin
        for (int i = 0; i < NTAPS - 1; i++) r[i] <= acc_out[i+1];
        y <= signed'(acc_out[0]);
      end
    end
  end

endmodule
