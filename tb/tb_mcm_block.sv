// tb_mcm_block: self-checking test of the two-stage BSE multiplier block.
// Two instances: the default plan (45 and 26 from the alphabet {1, 1001})
// and a five-coefficient plan whose matches come from worked examples
// (7730, 621, 221, 45, 26 from the alphabet {1, 101, 111, 1001, 10001}).
// Random and extreme signed samples are applied; every product is compared
// with x*C from the simulator's multiplier.
module tb_mcm_block
  import bse_pkg::*;
;
  localparam int unsigned XW = 16;
  localparam int unsigned CW = 16;
  localparam int unsigned PW = XW + CW;
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
  localparam int unsigned DEF_COEF[2] = '{45, 26};

  int checks = 0, failures = 0;

  logic signed [XW-1:0] x;
  logic signed [PW-1:0] p  [NCOEF];
  logic signed [PW-1:0] pd [2];

  mcm_block #(.XW(XW), .CW(CW), .NCOEF(NCOEF), .COEFS(COEF), .NSYM(NSYM),
              .ALPHABET(ALPHA), .NFRAG(NFRAG), .FRAGS(FR)) dut (.x(x), .prod(p));
  mcm_block dut_default (.x(x), .prod(pd));

  task automatic check();
    #1;
    for (int c = 0; c < NCOEF; c++) begin
      checks++;
      if (p[c] != PW'(longint'(x) * longint'(COEF[c]))) begin
        failures++;
        $display("FAIL x=%0d C=%0d: got %0d", x, COEF[c], p[c]);
      end
    end
    for (int c = 0; c < 2; c++) begin
      checks++;
      if (pd[c] != PW'(longint'(x) * longint'(DEF_COEF[c]))) begin
        failures++;
        $display("FAIL default x=%0d C=%0d: got %0d", x, DEF_COEF[c], pd[c]);
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
    for (int i = 0; i < 1000; i++) begin
      x = XW'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
