// tb_cla_adder: self-checking test of the carry look-ahead adder.
// A 16-bit instance (four full groups) and a 13-bit instance (last group
// partly filled) are driven with carry-chain corner cases and random
// operands; sum and carry-out are compared with a plain wide addition.
module tb_cla_adder;
  int checks = 0, failures = 0;

  logic [15:0] a, b, s;
  logic        ci, co;
  logic [12:0] a13, b13, s13;
  logic        ci13, co13;

  cla_adder #(.W(16)) dut   (.a(a),   .b(b),   .cin(ci),   .sum(s),   .cout(co));
  cla_adder #(.W(13)) dut13 (.a(a13), .b(b13), .cin(ci13), .sum(s13), .cout(co13));

  task automatic check();
    logic [16:0] e16;
    logic [13:0] e13;
    #1;
    e16 = 17'(a) + 17'(b) + 17'(ci);
    e13 = 14'(a13) + 14'(b13) + 14'(ci13);
    checks++;
    if ({co, s} != e16) begin
      failures++;
      $display("FAIL W=16 %h + %h + %b = %b_%h, expected %h", a, b, ci, co, s, e16);
    end
    checks++;
    if ({co13, s13} != e13) begin
      failures++;
      $display("FAIL W=13 %h + %h + %b = %b_%h, expected %h", a13, b13, ci13, co13, s13, e13);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // full carry propagation through all groups
    a = 16'hFFFF; b = 16'h0000; ci = 1; a13 = 13'h1FFF; b13 = 0; ci13 = 1; check();
    a = 16'hFFFF; b = 16'hFFFF; ci = 1; a13 = 13'h1FFF; b13 = 13'h1FFF; ci13 = 1; check();
    a = 16'h0FFF; b = 16'h0001; ci = 0; a13 = 13'h0FFF; b13 = 1; ci13 = 0; check();
    a = 16'h8000; b = 16'h8000; ci = 0; a13 = 13'h1000; b13 = 13'h1000; ci13 = 0; check();
    // every single carry-generating position
    for (int i = 0; i < 16; i++) begin
      a = 16'(1) << i; b = ~(16'(0)) << i; ci = 0;
      a13 = 13'(1) << (i % 13); b13 = ~(13'(0)) << (i % 13); ci13 = 0;
      check();
    end
    for (int i = 0; i < 3000; i++) begin
      a = 16'($urandom); b = 16'($urandom); ci = 1'($urandom);
      a13 = 13'($urandom); b13 = 13'($urandom); ci13 = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
