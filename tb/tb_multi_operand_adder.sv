// tb_multi_operand_adder: self-checking test of the CSA-tree + CPA adder.
// Instances with 1, 2, 3, 4, 5 and 9 operands of 20 bits are fed random
// values (and all-ones corners); each sum is compared with a behavioural
// sum modulo 2^20.
module tb_multi_operand_adder;
  localparam int W = 20;
  int checks = 0, failures = 0;

  logic [W-1:0] o1[1], o2[2], o3[3], o4[4], o5[5], o9[9];
  logic [W-1:0] s1, s2, s3, s4, s5, s9;

  multi_operand_adder #(.K(1), .W(W)) d1 (.ops(o1), .sum(s1));
  multi_operand_adder #(.K(2), .W(W)) d2 (.ops(o2), .sum(s2));
  multi_operand_adder #(.K(3), .W(W)) d3 (.ops(o3), .sum(s3));
  multi_operand_adder #(.K(4), .W(W)) d4 (.ops(o4), .sum(s4));
  multi_operand_adder #(.K(5), .W(W)) d5 (.ops(o5), .sum(s5));
  multi_operand_adder #(.K(9), .W(W)) d9 (.ops(o9), .sum(s9));

  function automatic logic [W-1:0] ref_sum(input logic [W-1:0] v[], input int n);
    logic [W-1:0] acc = '0;
    for (int i = 0; i < n; i++) acc += v[i];
    return acc;
  endfunction

  task automatic cmp(input string name, input logic [W-1:0] got, input logic [W-1:0] exp_v);
    checks++;
    if (got != exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", name, got, exp_v);
    end
  endtask

  task automatic fill(input bit ones);
    for (int i = 0; i < 1; i++) o1[i] = ones ? '1 : W'($urandom);
    for (int i = 0; i < 2; i++) o2[i] = ones ? '1 : W'($urandom);
    for (int i = 0; i < 3; i++) o3[i] = ones ? '1 : W'($urandom);
    for (int i = 0; i < 4; i++) o4[i] = ones ? '1 : W'($urandom);
    for (int i = 0; i < 5; i++) o5[i] = ones ? '1 : W'($urandom);
    for (int i = 0; i < 9; i++) o9[i] = ones ? '1 : W'($urandom);
  endtask

  task automatic check_all();
    logic [W-1:0] v[];
    #1;
    v = new[1]; foreach (v[i]) v[i] = o1[i]; cmp("K=1", s1, ref_sum(v, 1));
    v = new[2]; foreach (v[i]) v[i] = o2[i]; cmp("K=2", s2, ref_sum(v, 2));
    v = new[3]; foreach (v[i]) v[i] = o3[i]; cmp("K=3", s3, ref_sum(v, 3));
    v = new[4]; foreach (v[i]) v[i] = o4[i]; cmp("K=4", s4, ref_sum(v, 4));
    v = new[5]; foreach (v[i]) v[i] = o5[i]; cmp("K=5", s5, ref_sum(v, 5));
    v = new[9]; foreach (v[i]) v[i] = o9[i]; cmp("K=9", s9, ref_sum(v, 9));
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Wallace depth of the cost model: 9 operands need 4 CSA levels
    checks++;
    if (bse_pkg::csa_levels(9) != 4 || bse_pkg::csa_levels(3) != 1 || bse_pkg::csa_levels(2) != 0) begin
      failures++;
      $display("FAIL csa_levels");
    end
    fill(1'b1); check_all();
    for (int n = 0; n < 1000; n++) begin
      fill(1'b0);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
