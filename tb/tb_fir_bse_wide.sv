// tb_fir_bse_wide: the BSE FIR filter at sizes of the evaluated filters:
// 32 taps and 128 taps (16 and 64 distinct coefficients, shared between
// symmetric taps), 16-bit coefficients, CPA:CSA cost ratio 4. The
// coefficient values are generated (see fir_wide_case), not those of any
// particular filter design.
module tb_fir_bse_wide;
  logic clk = 0;
  int   c32, f32, c128, f128;
  logic d32, d128;

  always #5 clk = ~clk;

  fir_wide_case #(.NT(32))  u32  (.clk(clk), .checks(c32),  .failures(f32),  .done(d32));
  fir_wide_case #(.NT(128)) u128 (.clk(clk), .checks(c128), .failures(f128), .done(d128));

  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c32 + c128, f32 + f128 + 1);
    $finish;
  end

  initial begin
    int failures;
    wait (d32 && d128);
    failures = f32 + f128;
    if (c32 < 100 || c128 < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", c32 + c128, failures);
    $finish;
  end
endmodule
