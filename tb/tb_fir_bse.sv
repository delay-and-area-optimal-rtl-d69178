// tb_fir_bse: end-to-end test of the BSE FIR filter with a larger plan.
// Five coefficients whose matches come from worked examples (7730, 621, 221,
// 45, 26 built from the alphabet {1, 101, 111, 1001, 10001}) drive six taps,
// three of them subtracting. This plan needs CSA trees in both the alphabet
// unit (111) and the fragment unit (three- and four-fragment matches),
// single-CPA symbols, pass-through symbol 1 and symbols shared between
// coefficients. The test checks:
//   * the unit-cost estimate of the plan (area 23, longest path 6 units at a
//     CPA:CSA ratio of 2), worked out by hand from the matches, and the
//     cost functions on single paths and symbols;
//   * an impulse response equal to the signed tap coefficients;
//   * random samples with idle cycles between them and a reset in
//     mid-stream, against a convolution computed with multiplications;
//   * one-clock latency: out_valid follows in_valid by exactly one cycle.
// Each mechanism is counted; one that never happens is a failure.
module tb_fir_bse
  import bse_pkg::*;
;
  localparam int unsigned XW = 16;
  localparam int unsigned NCOEF = 5;
  localparam int unsigned COEF[NCOEF] = '{7730, 621, 221, 45, 26};
  localparam int unsigned NSYM = 5;
  localparam int unsigned ALPHA[NSYM] = '{1, 5, 7, 9, 17};
  localparam int unsigned NFRAG = 14;
  localparam frag_t FR[NFRAG] = '{
    '{0, 7, 10}, '{0, 17, 5}, '{0, 9, 1},
    '{1, 9, 6},  '{1, 9, 2},  '{1, 9, 0},
    '{2, 1, 7},  '{2, 5, 4},  '{2, 1, 3}, '{2, 5, 0},
    '{3, 9, 2},  '{3, 9, 0},
    '{4, 9, 1},  '{4, 1, 3}};
  localparam int unsigned NTAPS = 6;
  localparam int unsigned TC[NTAPS] = '{0, 1, 2, 3, 4, 0};
  localparam bit NEG[NTAPS] = '{1'b0, 1'b1, 1'b0, 1'b0, 1'b1, 1'b1};
  localparam int unsigned YW = XW + 16 + 3;

  int checks = 0, failures = 0;
  int n_accept = 0, n_idle = 0, n_neg = 0, n_fullscale = 0, n_reset = 0, n_csa = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [XW-1:0] x_in = '0;
  logic out_valid;
  logic signed [YW-1:0] y_out;

  fir_bse #(.XW(XW), .CW(16), .NCOEF(NCOEF), .COEFS(COEF), .NSYM(NSYM), .ALPHABET(ALPHA),
            .NFRAG(NFRAG), .FRAGS(FR), .NTAPS(NTAPS), .TAP_COEF(TC), .TAP_NEG(NEG),
            .CPA_RATIO(2)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  longint xh [NTAPS];   // accepted samples, xh[0] newest
  longint y_exp, y_hold;

  function automatic longint tap_c(input int i);
    return NEG[i] ? -longint'(COEF[TC[i]]) : longint'(COEF[TC[i]]);
  endfunction

  function automatic longint model();
    longint acc = 0;
    for (int i = 0; i < NTAPS; i++) acc += tap_c(i) * xh[i];
    return acc;
  endfunction

  task automatic step(input bit v, input logic signed [XW-1:0] xv);
    @(negedge clk);
    in_valid = v;
    x_in = xv;
    y_hold = y_out;
    if (v) begin
      for (int k = NTAPS - 1; k > 0; k--) xh[k] = xh[k-1];
      xh[0] = xv;
      y_exp = model();
      for (int i = 0; i < NTAPS; i++) if (NEG[i] && xh[i] != 0) n_neg++;
      for (int i = 0; i < NTAPS; i++) if (TC[i] <= 2 && xh[i] != 0) n_csa++;
      if (xv == -(longint'(1) << (XW - 1))) n_fullscale++;
    end
    @(posedge clk);
    #1;
    checks++;
    if (v) begin
      n_accept++;
      if (!out_valid || y_out != YW'(y_exp)) begin
        failures++;
        $display("FAIL sample %0d: x=%0d y=%0d valid=%b expected %0d", n_accept, xv, y_out, out_valid, y_exp);
      end
    end else begin
      n_idle++;
      if (out_valid || y_out != YW'(y_hold)) begin
        failures++;
        $display("FAIL idle: y=%0d valid=%b", y_out, out_valid);
      end
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NTAPS; k++) xh[k] = 0;

    // cost estimate of the plan: symbols 0+2+3+2+2, matches 3+3+4+2+2
    checks++;
    if (dut.EST_AREA != 23 || dut.EST_DELAY != 6) begin
      failures++;
      $display("FAIL estimate: area %0d delay %0d", dut.EST_AREA, dut.EST_DELAY);
    end

    // unit-cost model on single paths and symbols (CPA = 2 CSA units):
    // {F(1,7), F(101,4), F(1,3)} is 5 units long; a five-fragment match
    // costs 5 units and a four-fragment one 4; symbols 1011 / 101101 cost 3 / 4
    checks++;
    if (sym_delay(5, 2) + sum_delay(3, 2) != 5 || sum_area(5, 2) != 5 || sum_area(4, 2) != 4 ||
        sym_area(11, 2) != 3 || sym_area(45, 2) != 4 || sym_area(1, 2) != 0) begin
      failures++;
      $display("FAIL cost model");
    end

    repeat (2) @(posedge clk);
    rst_n = 1;

    // impulse response: y = signed coefficient of each tap in turn
    step(1'b1, 16'sd1);
    for (int i = 1; i < NTAPS + 2; i++) step(1'b1, 16'sd0);

    for (int n = 0; n < 3000; n++) begin
      logic signed [XW-1:0] xv;
      xv = XW'($urandom);
      if (n % 50 == 7)  xv = 16'sh8000;
      if (n % 50 == 8)  xv = 16'sh7FFF;
      step(($urandom % 4) != 0, xv);
      if (n == 1500) begin
        @(negedge clk); in_valid = 0; rst_n = 0;
        @(negedge clk); rst_n = 1;
        for (int k = 0; k < NTAPS; k++) xh[k] = 0;
        n_reset++;
      end
    end

    checks++;
    if (n_accept == 0 || n_idle == 0 || n_neg == 0 || n_fullscale == 0 || n_reset == 0 || n_csa == 0) begin
      failures++;
      $display("FAIL mechanism not exercised");
    end
    $display("mechanisms: samples=%0d idle=%0d negative-tap=%0d full-scale=%0d reset=%0d csa-match=%0d",
             n_accept, n_idle, n_neg, n_fullscale, n_reset, n_csa);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
