// tb_csa_tree: checks that sum + carry equals the sum of all operands
// (modulo 2^W) for random and all-ones operands, on the default tree and on
// trees with other operand counts (1, 2, 3 and 12 operands).
module tb_csa_tree;
  localparam int unsigned W = 32;

  logic [W-1:0] ops5 [5];
  logic [W-1:0] s5, c5;
  logic [19:0]  ops12 [12];
  logic [19:0]  s12, c12;
  logic [W-1:0] ops1 [1], ops2 [2], ops3 [3];
  logic [W-1:0] s1, c1, s2, c2, s3, c3;
  int checks = 0, failures = 0;

  csa_tree u5 (.ops(ops5), .sum(s5), .carry(c5));
  csa_tree #(.N(12), .W(20)) u12 (.ops(ops12), .sum(s12), .carry(c12));
  csa_tree #(.N(1), .W(W)) u1 (.ops(ops1), .sum(s1), .carry(c1));
  csa_tree #(.N(2), .W(W)) u2 (.ops(ops2), .sum(s2), .carry(c2));
  csa_tree #(.N(3), .W(W)) u3 (.ops(ops3), .sum(s3), .carry(c3));

  task automatic check(logic [63:0] got, logic [63:0] exp_v, string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      if (failures < 5) $display("%s: got %h expected %h", what, got, exp_v);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [W-1:0] e5, e1, e2, e3;
      logic [19:0]  e12;
      e5 = '0; e12 = '0; e2 = '0; e3 = '0;
      for (int i = 0; i < 5; i++) begin
        ops5[i] = (n == 0) ? '1 : $urandom;
        e5 += ops5[i];
      end
      for (int i = 0; i < 12; i++) begin
        ops12[i] = (n == 0) ? '1 : 20'($urandom);
        e12 += ops12[i];
      end
      ops1[0] = $urandom; e1 = ops1[0];
      for (int i = 0; i < 2; i++) begin ops2[i] = $urandom; e2 += ops2[i]; end
      for (int i = 0; i < 3; i++) begin ops3[i] = $urandom; e3 += ops3[i]; end
      #1;
      check(64'(W'(s5 + c5)), 64'(e5), "N=5");
      check(64'(20'(s12 + c12)), 64'(e12), "N=12");
      check(64'(W'(s1 + c1)), 64'(e1), "N=1");
      check(64'(W'(s2 + c2)), 64'(e2), "N=2");
      check(64'(W'(s3 + c3)), 64'(e3), "N=3");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
