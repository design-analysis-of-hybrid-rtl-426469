// tb_gf_pe: drives one systolic PE with random serial bits, operands and
// incoming partial sums, and checks that psum_out is always the incoming
// partial sum of the previous cycle XOR the accumulator, where the
// accumulator is tracked by an independent model.
module tb_gf_pe;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  logic  clk = 1'b0;
  logic  clr = 1'b0, acc_en = 1'b0, b_bit = 1'b0;
  elem_t a_in = '0, psum_in = '0, psum_out;
  int    checks = 0, failures = 0;

  gf_pe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    elem_t acc_m, exp_out;
    @(negedge clk);
    clr = 1'b1;
    @(negedge clk);
    clr = 1'b0;
    acc_m = '0;
    for (int i = 0; i < 600; i++) begin
      // stimulus for this cycle
      clr    = ($urandom % 40 == 0);
      acc_en = ($urandom % 4 != 0);
      b_bit  = 1'($urandom);
      a_in   = rand_elem(1'b1);
      psum_in = rand_elem(1'b1);
      exp_out = psum_in ^ acc_m;
      if (clr) acc_m = '0;
      else if (acc_en && b_bit) acc_m = acc_m ^ a_in;
      @(negedge clk);
      checks++;
      if (psum_out !== exp_out) begin
        failures++;
        if (failures < 5) $display("mismatch at cycle %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
