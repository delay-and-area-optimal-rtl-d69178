// tb_tap_chain: self-checking test of the transposed FIR adder/register chain.
// Four taps, the second and fourth subtracting. Every cycle random tap
// products are presented and en is raised about two cycles in three. A
// reference keeps the products of the accepted samples and forms
// y[n] = sum_i (+/-) t_i[n-i]; one clock after each accepted sample y must
// equal it and y_valid must be high. On idle cycles y_valid must be low and
// y must hold. A reset in mid-stream must clear the history.
module tb_tap_chain;
  localparam int unsigned NTAPS = 4;
  localparam int unsigned PW = 20;
  localparam int unsigned YW = PW + 2;
  localparam bit NEG[NTAPS] = '{1'b0, 1'b1, 1'b0, 1'b1};

  int checks = 0, failures = 0;
  int accepted = 0, idles = 0;

  logic clk = 0, rst_n = 0, en = 0;
  logic signed [PW-1:0] t [NTAPS];
  logic signed [YW-1:0] y;
  logic y_valid;

  tap_chain #(.NTAPS(NTAPS), .PW(PW), .YW(YW), .TAP_NEG(NEG)) dut (
    .clk(clk), .rst_n(rst_n), .en(en), .t(t), .y(y), .y_valid(y_valid));

  always #5 clk = ~clk;

  // hist[k][i] = product of tap i at the k-th most recent accepted sample
  longint hist [NTAPS][NTAPS];
  longint y_exp, y_hold;

  function automatic longint model();
    longint acc = 0;
    for (int i = 0; i < NTAPS; i++) acc += NEG[i] ? -hist[i][i] : hist[i][i];
    return acc;
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int cycles);
    for (int n = 0; n < cycles; n++) begin
      @(negedge clk);
      en = ($urandom % 3) != 0;
      for (int i = 0; i < NTAPS; i++) t[i] = PW'($urandom);
      if (n % 97 == 5) for (int i = 0; i < NTAPS; i++) t[i] = {1'b1, {(PW-1){1'b0}}};
      y_hold = y;
      if (en) begin
        for (int k = NTAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        for (int i = 0; i < NTAPS; i++) hist[0][i] = t[i];
        y_exp = model();
      end
      @(posedge clk);
      #1;
      checks++;
      if (en) begin
        accepted++;
        if (!y_valid || y != YW'(y_exp)) begin
          failures++;
          $display("FAIL cycle %0d: y=%0d valid=%b expected %0d", n, y, y_valid, y_exp);
        end
      end else begin
        idles++;
        if (y_valid || y != YW'(y_hold)) begin
          failures++;
          $display("FAIL idle cycle %0d: y=%0d valid=%b", n, y, y_valid);
        end
      end
    end
  endtask

  initial begin
    for (int k = 0; k < NTAPS; k++) for (int i = 0; i < NTAPS; i++) hist[k][i] = 0;
    for (int i = 0; i < NTAPS; i++) t[i] = '0;
    repeat (2) @(posedge clk);
    checks++;
    if (y != 0 || y_valid) begin failures++; $display("FAIL reset state"); end
    rst_n = 1;
    run(2000);
    // reset in mid-stream clears the partial sums
    @(negedge clk); en = 0; rst_n = 0;
    @(negedge clk); rst_n = 1;
    for (int k = 0; k < NTAPS; k++) for (int i = 0; i < NTAPS; i++) hist[k][i] = 0;
    run(500);
    checks++;
    if (accepted < 100 || idles < 100) begin
      failures++;
      $display("FAIL coverage: accepted=%0d idle=%0d", accepted, idles);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
