// tb_csa: self-checking test of the carry-save adder.
// Drives random and corner operands into a 16-bit and a 5-bit csa and checks
// that sum is the bitwise XOR, that carry is the shifted majority, and that
// sum + carry equals x + y + z modulo 2^W.
module tb_csa;
  int checks = 0, failures = 0;

  logic [15:0] x, y, z, s, c;
  logic [4:0]  x5, y5, z5, s5, c5;

  csa #(.W(16)) dut   (.x(x),  .y(y),  .z(z),  .sum(s),  .carry(c));
  csa #(.W(5))  dut5  (.x(x5), .y(y5), .z(z5), .sum(s5), .carry(c5));

  task automatic check16();
    logic [15:0] exp_sum;
    exp_sum = x + y + z;
    checks++;
    if (s != (x ^ y ^ z) || 16'(s + c) != exp_sum || c[0] != 1'b0) begin
      failures++;
      $display("FAIL x=%h y=%h z=%h: sum=%h carry=%h", x, y, z, s, c);
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
    x = '1; y = '1; z = '1; #1 check16();
    x = '0; y = '0; z = '0; #1 check16();
    x = 16'h8000; y = 16'h8000; z = 16'h0001; #1 check16();
    for (int i = 0; i < 2000; i++) begin
      x = 16'($urandom); y = 16'($urandom); z = 16'($urandom);
      #1 check16();
    end
    // 5-bit instance exhaustively over x, y with a few z
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++) begin
        x5 = 5'(a); y5 = 5'(b); z5 = 5'(a * 7 + b);
        #1;
        checks++;
        if (5'(s5 + c5) != 5'(x5 + y5 + z5) || s5 != (x5 ^ y5 ^ z5)) begin
          failures++;
          $display("FAIL W=5 %0d %0d %0d", x5, y5, z5);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
