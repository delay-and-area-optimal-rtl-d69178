// tb_fir_bse_full: the BSE FIR filter with all parameters at their defaults,
// i.e. the optimised two-coefficient working example: y[n] = 45*x[n] +
// 26*x[n-1], with 45 = F(1001,2)+F(1001,0) and 26 = F(1001,1)+F(1,3).
// Checks the unit-cost estimate (total area 6 and longest path 4 units at
// a CPA:CSA ratio of 2, as for the optimum of that example), the impulse
// response, a step response and a random stream with idle cycles, each
// output one clock after its sample.
module tb_fir_bse_full;
  int checks = 0, failures = 0;
  int n_accept = 0, n_idle = 0;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [15:0] x_in = '0;
  logic out_valid;
  logic signed [32:0] y_out;

  fir_bse dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .x_in(x_in),
               .out_valid(out_valid), .y_out(y_out));

  always #5 clk = ~clk;

  longint x0 = 0, x1 = 0;   // newest and previous accepted samples

  task automatic step(input bit v, input logic signed [15:0] xv);
    longint y_hold, y_exp;
    @(negedge clk);
    in_valid = v;
    x_in = xv;
    y_hold = y_out;
    if (v) begin
      x1 = x0;
      x0 = xv;
    end
    y_exp = 45 * x0 + 26 * x1;
    @(posedge clk);
    #1;
    checks++;
    if (v) begin
      n_accept++;
      if (!out_valid || y_out != 33'(y_exp)) begin
        failures++;
        $display("FAIL x=%0d: y=%0d valid=%b expected %0d", xv, y_out, out_valid, y_exp);
      end
    end else begin
      n_idle++;
      if (out_valid || y_out != 33'(y_hold)) begin
        failures++;
        $display("FAIL idle: y=%0d valid=%b", y_out, out_valid);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.EST_AREA != 6 || dut.EST_DELAY != 4) begin
      failures++;
      $display("FAIL estimate: area %0d delay %0d", dut.EST_AREA, dut.EST_DELAY);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    step(1'b1, 16'sd1);                             // impulse: 45, 26, 0
    step(1'b1, 16'sd0);
    step(1'b1, 16'sd0);
    for (int i = 0; i < 4; i++) step(1'b1, -16'sd1000); // step: -45000, -71000, ...
    for (int n = 0; n < 2000; n++) begin
      logic signed [15:0] xv;
      xv = 16'($urandom);
      if (n % 100 == 3) xv = 16'sh8000;
      if (n % 100 == 4) xv = 16'sh7FFF;
      step(($urandom % 4) != 0, xv);
    end
    checks++;
    if (n_accept == 0 || n_idle == 0) begin
      failures++;
      $display("FAIL no idle cycles or no samples");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
