// tb_gf_hybrid_mult: multiplies random and corner-case operands in both
// fields, alternating the field, and checks each product against the
// reference model and the latency of d + w cycles from start to done.
module tb_gf_hybrid_mult;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned D = (M2 + W - 1) / W;

  logic   clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  field_e mode = FIELD_PENTA;
  elem_t  a = '0, b = '0, c;
  logic   busy, done;
  int     checks = 0, failures = 0;

  gf_hybrid_mult #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(relem_t av, relem_t bv, bit md);
    automatic int cycles = 0;
    relem_t exp_c;
    @(negedge clk);
    a = av; b = bv; mode = md ? FIELD_PENTA : FIELD_TRI; start = 1'b1;
    @(negedge clk);
    start = 1'b0; a = '0; b = '0;
    cycles = 0;                         // edges after the load edge
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    if (!md) begin
      av = av & ((relem_t'(1) << RM1) - 1);
      bv = bv & ((relem_t'(1) << RM1) - 1);
    end
    exp_c = gf_mul(av, bv, md);
    checks++;
    if (c !== exp_c) begin
      failures++;
      $display("product mismatch mode=%0d", md);
    end
    checks++;
    if (cycles != int'(D + W)) begin
      failures++;
      $display("latency %0d, expected %0d", cycles, D + W);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int md = 0; md < 2; md++) begin
      run('0, rand_elem(md[0]), md[0]);
      run(relem_t'(1), rand_elem(md[0]), md[0]);
      run(rand_elem(md[0]), xpow(1, md[0]), md[0]);
      run('1, '1, md[0]);                 // bits above the field are ignored
    end
    for (int n = 0; n < 30; n++) begin
      automatic bit md = ($urandom % 2) == 1;
      run(rand_elem(md), rand_elem(md), md);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
