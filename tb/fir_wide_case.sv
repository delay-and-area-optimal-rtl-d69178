// fir_wide_case: one filter of tb_fir_bse_wide. Builds an NT-tap linear-phase
// (symmetric) filter with NT/2 rounded up distinct 16-bit coefficients, makes
// a valid match for every coefficient, runs random samples through fir_bse
// and compares each output with a convolution computed by multiplication.
//
// Coefficients: c_k = 1 + ((k*40503 + 12345) * 2654435761 mod 2^32) >> 16,
// i.e. pseudo-random 16-bit magnitudes; taps i and NT-1-i share one
// coefficient (and one multiplier-block product); taps with bit 0 of
// (i*7 + 3)/5 set subtract.
// Matches: the coefficient is scanned from its most significant 1 downwards
// and at each 1 the longest symbol of {1001, 111, 101, 11, 1} whose bits are
// all still uncovered is taken, so every 1 is covered exactly once.
// Reports its check and failure counts on its outputs when done is high.
module fir_wide_case
  import bse_pkg::*;
#(
  parameter int unsigned NT = 32
) (
  input  logic clk,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int unsigned NC = (NT + 1) / 2;
  localparam int unsigned NS = 5;
  localparam int unsigned ALPHA[NS] = '{1, 3, 5, 7, 9};

  typedef int unsigned coef_arr_t [NC];

  function automatic int unsigned coef(input int unsigned k);
    int unsigned h;
    h = (k * 40503 + 12345) * 32'd2654435761;
    return 1 + (h >> 16) % 65535;
  endfunction

  function automatic coef_arr_t make_coefs();
    coef_arr_t a;
    for (int unsigned k = 0; k < NC; k++) a[k] = coef(k);
    return a;
  endfunction

  // greedy match: fragments of coefficient value v; returns count, fills f when emit
  function automatic int unsigned match_count(input int unsigned v);
    int unsigned rem = v, n = 0;
    int unsigned order [NS] = '{9, 7, 5, 3, 1};
    for (int p = 31; p >= 0; p--) begin
      if (rem[p]) begin
        for (int j = 0; j < NS; j++) begin
          int unsigned len = bit_len(order[j]);
          if (p + 1 >= int'(len)) begin
            int unsigned sh = p + 1 - len;
            if ((rem & (order[j] << sh)) == (order[j] << sh)) begin
              rem &= ~(order[j] << sh);
              n++;
              break;
            end
          end
        end
      end
    end
    return n;
  endfunction

  function automatic int unsigned total_frags();
    int unsigned n = 0;
    for (int unsigned k = 0; k < NC; k++) n += match_count(coef(k));
    return n;
  endfunction

  localparam int unsigned NF = total_frags();
  typedef bit [$bits(frag_t)-1:0] frag_arr_t [NF];  // same bits as frag_t

  function automatic frag_arr_t make_frags();
    frag_arr_t f;
    int unsigned idx = 0;
    int unsigned order [NS] = '{9, 7, 5, 3, 1};
    for (int unsigned k = 0; k < NC; k++) begin
      int unsigned rem = coef(k);
      for (int p = 31; p >= 0; p--) begin
        if (rem[p]) begin
          for (int j = 0; j < NS; j++) begin
            int unsigned len = bit_len(order[j]);
            if (p + 1 >= int'(len)) begin
              int unsigned sh = p + 1 - len;
              if ((rem & (order[j] << sh)) == (order[j] << sh)) begin
                rem &= ~(order[j] << sh);
                f[idx] = {k, order[j], sh};   // coef, sym, shift
                idx++;
                break;
              end
            end
          end
        end
      end
    end
    return f;
  endfunction

  typedef int unsigned tapc_arr_t [NT];
  typedef bit          tapn_arr_t [NT];

  function automatic tapc_arr_t make_tapc();
    tapc_arr_t a;
    for (int unsigned i = 0; i < NT; i++) a[i] = (i < NC) ? i : NT - 1 - i;
    return a;
  endfunction

  function automatic tapn_arr_t make_tapn();
    tapn_arr_t a;
    for (int unsigned i = 0; i < NT; i++) a[i] = 1'(((i * 7 + 3) / 5) & 1);
    return a;
  endfunction

  localparam coef_arr_t COEF = make_coefs();
  localparam frag_t FR [NF]  = make_frags();
  localparam tapc_arr_t TC   = make_tapc();
  localparam tapn_arr_t TN   = make_tapn();
  localparam int unsigned YW = 32 + $clog2(NT);

  logic rst_n = 1'b0, in_valid = 1'b0;
  logic signed [15:0] x_in = '0;
  logic out_valid;
  logic signed [YW-1:0] y_out;

  fir_bse #(.XW(16), .CW(16), .NCOEF(NC), .COEFS(COEF), .NSYM(NS), .ALPHABET(ALPHA),
            .NFRAG(NF), .FRAGS(FR), .NTAPS(NT), .TAP_COEF(TC), .TAP_NEG(TN),
            .CPA_RATIO(4)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
    .out_valid(out_valid), .y_out(y_out));

  longint xh [NT];

  initial begin
    checks = 0;
    failures = 0;
    done = 1'b0;
    for (int i = 0; i < NT; i++) xh[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NT + 300; n++) begin
      longint e;
      @(negedge clk);
      in_valid = ($urandom % 5) != 0;
      x_in = 16'($urandom);
      if (n % 37 == 0) x_in = 16'sh8000;
      if (in_valid) begin
        for (int k = NT - 1; k > 0; k--) xh[k] = xh[k-1];
        xh[0] = x_in;
      end
      e = 0;
      for (int i = 0; i < NT; i++)
        e += (TN[i] ? -longint'(COEF[TC[i]]) : longint'(COEF[TC[i]])) * xh[i];
      @(posedge clk);
      #1;
      if (in_valid) begin
        checks++;
        if (!out_valid || y_out != YW'(e)) begin
          failures++;
          if (failures < 5) $display("FAIL %0d taps, sample %0d: y=%0d expected %0d", NT, n, y_out, e);
        end
      end
    end
    $display("%0d taps: %0d coefficients, %0d fragments, estimate area %0d delay %0d units",
             NT, NC, NF, dut.EST_AREA, dut.EST_DELAY);
    done = 1'b1;
  end
endmodule
