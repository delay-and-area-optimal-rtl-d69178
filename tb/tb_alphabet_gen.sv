// tb_alphabet_gen: self-checking test of the alphabet generation unit.
// The alphabet holds symbols with one to five non-zero bits (1, 11, 101,
// 111, 1001, 10001, 101101, 1011011 and a 16-bit symbol), so the bypass,
// the single-CPA case and CSA trees of several depths are all built. Random
// and extreme signed samples are applied and every output is compared with
// x*S computed by the simulator's multiplier.
module tb_alphabet_gen;
  localparam int unsigned XW = 16;
  localparam int unsigned PW = 32;
  localparam int unsigned NSYM = 9;
  localparam int unsigned ALPHA[NSYM] = '{1, 3, 5, 7, 9, 17, 45, 91, 16'hC3A5 | 1};

  int checks = 0, failures = 0;

  logic signed [XW-1:0] x;
  logic        [PW-1:0] sp [NSYM];

  alphabet_gen #(.XW(XW), .PW(PW), .NSYM(NSYM), .ALPHABET(ALPHA)) dut (.x(x), .sym_prod(sp));

  task automatic check();
    #1;
    for (int s = 0; s < NSYM; s++) begin
      longint e;
      e = longint'(x) * longint'(ALPHA[s]);
      checks++;
      if (sp[s] != PW'(e)) begin
        failures++;
        $display("FAIL x=%0d S=%0d: got %0d expected %0d", x, ALPHA[s], $signed(sp[s]), e);
      end
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
    x = 16'sh7FFF; check();
    x = 16'sh8000; check();
    x = -16'sd1;   check();
    x = 16'sd0;    check();
    x = 16'sd1;    check();
    for (int i = 0; i < 1000; i++) begin
      x = XW'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
