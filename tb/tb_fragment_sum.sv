// tb_fragment_sum: self-checking test of the fragment summation unit.
// The plan holds five matches taken from worked examples: 1111000110010 =
// F(111,10)+F(10001,5)+F(1001,1), 1001101101 = F(1001,6)+F(1001,2)+F(1001,0),
// 11011101 = F(1,7)+F(101,4)+F(1,3)+F(101,0), 101101 = F(1001,2)+F(1001,0)
// and 011010 = F(1001,1)+F(1,3), with the fragments listed out of order.
// The symbol-product inputs are driven with independent random words (not
// real products), so each output must equal the shifted sum of exactly the
// right inputs; the expected values are computed here from the match table.
module tb_fragment_sum
  import bse_pkg::*;
;
  localparam int unsigned PW = 32;
  localparam int unsigned NCOEF = 5;
  localparam int unsigned NSYM = 5;
  localparam int unsigned ALPHA[NSYM] = '{1, 5, 7, 9, 17};
  localparam int unsigned NFRAG = 14;
  localparam frag_t FR[NFRAG] = '{
    '{4, 1, 3}, '{0, 7, 10}, '{1, 9, 6}, '{2, 1, 7}, '{0, 17, 5}, '{1, 9, 2}, '{2, 5, 4},
    '{3, 9, 2}, '{0, 9, 1},  '{1, 9, 0}, '{2, 1, 3}, '{3, 9, 0},  '{2, 5, 0}, '{4, 9, 1}};

  int checks = 0, failures = 0;

  logic [PW-1:0] sp [NSYM];
  logic [PW-1:0] pr [NCOEF];

  fragment_sum #(.PW(PW), .NCOEF(NCOEF), .NSYM(NSYM), .ALPHABET(ALPHA),
                 .NFRAG(NFRAG), .FRAGS(FR)) dut (.sym_prod(sp), .prod(pr));

  // expected outputs written out per coefficient, symbol positions 0..4 = 1,5,7,9,17
  task automatic check();
    logic [PW-1:0] e [NCOEF];
    #1;
    e[0] = (sp[2] << 10) + (sp[4] << 5) + (sp[3] << 1);
    e[1] = (sp[3] << 6) + (sp[3] << 2) + sp[3];
    e[2] = (sp[0] << 7) + (sp[1] << 4) + (sp[0] << 3) + sp[1];
    e[3] = (sp[3] << 2) + sp[3];
    e[4] = (sp[3] << 1) + (sp[0] << 3);
    for (int c = 0; c < NCOEF; c++) begin
      checks++;
      if (pr[c] != e[c]) begin
        failures++;
        $display("FAIL coefficient %0d: got %h expected %h", c, pr[c], e[c]);
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
    for (int s = 0; s < NSYM; s++) sp[s] = '1;
    check();
    for (int i = 0; i < 1000; i++) begin
      for (int s = 0; s < NSYM; s++) sp[s] = PW'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
