// tb_hybrid_int_mult: multiplies random and corner-case 32-bit operands and
// checks each product against the * operator and the three-cycle latency
// from start to done; also runs a 12-bit instance exhaustively on a stride.
module tb_hybrid_int_mult;
  localparam int unsigned N = 32;

  logic           clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [N-1:0]   a = '0, b = '0;
  logic           busy, done;
  logic [2*N-1:0] p;
  logic           start_s = 1'b0, busy_s, done_s;
  logic [11:0]    a_s = '0, b_s = '0;
  logic [23:0]    p_s;
  int checks = 0, failures = 0;

  hybrid_int_mult dut (.*);
  hybrid_int_mult #(.N(12)) dut_s (.clk(clk), .rst_n(rst_n), .start(start_s), .a(a_s), .b(b_s),
                                   .busy(busy_s), .done(done_s), .p(p_s));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [N-1:0] av, logic [N-1:0] bv, logic [11:0] as, logic [11:0] bs);
    int cycles = 0;
    @(negedge clk);
    a = av; b = bv; a_s = as; b_s = bs; start = 1'b1; start_s = 1'b1;
    @(negedge clk);
    start = 1'b0; start_s = 1'b0; a = '0; b = '0; a_s = '0; b_s = '0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks++;
    if (p !== (2*N)'(av) * (2*N)'(bv)) begin
      failures++;
      if (failures < 5) $display("mismatch %h * %h = %h", av, bv, p);
    end
    checks++;
    if (cycles != 3) begin
      failures++;
      $display("latency %0d, expected 3", cycles);
    end
    checks++;
    if (!done_s || p_s !== 24'(as) * 24'(bs)) begin
      failures++;
      if (failures < 5) $display("12-bit mismatch %h * %h = %h", as, bs, p_s);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run('1, '1, '1, '1);
    run('0, '1, '0, 12'hFFF);
    run(32'h0000_FFFF, 32'hFFFF_0000, 12'h03F, 12'hFC0);
    run(32'h8000_0000, 32'h8000_0001, 12'h800, 12'h801);
    for (int n = 0; n < 1000; n++)
      run($urandom, $urandom, 12'($urandom), 12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
