// tb_hsds_top: end-to-end test of the top level at its default parameters.
// Runs the GF(2^m) multiplier and the integer multiplier at the same time:
// a sequence of field products that switches between the trinomial and the
// pentanomial field, and a stream of integer products started whenever the
// integer multiplier is free. Every result is checked against the reference
// models, and every GF result for its d + w cycle latency. It counts how
// often each mechanism occurred (products in each field, field switches,
// operands with bits above the small field, integer products, cycles with
// both multipliers busy) and fails if one never did.
module tb_hsds_top;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned D = (M2 + W - 1) / W;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic         gf_start = 1'b0;
  field_e       gf_mode = FIELD_PENTA;
  elem_t        gf_a = '0, gf_b = '0, gf_c;
  logic         gf_busy, gf_done;
  logic         int_start = 1'b0;
  logic [31:0]  int_a = '0, int_b = '0;
  logic         int_busy, int_done;
  logic [63:0]  int_p;

  int checks = 0, failures = 0;
  int n_tri = 0, n_penta = 0, n_switch = 0, n_masked = 0, n_int = 0, n_overlap = 0;
  bit gf_finished = 1'b0;

  hsds_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (gf_busy && int_busy) n_overlap++;

  // Integer stream: start a new product whenever the multiplier is free.
  initial begin
    logic [31:0] av, bv;
    wait (rst_n);
    while (!gf_finished) begin
      @(negedge clk);
      av = $urandom; bv = $urandom;
      int_a = av; int_b = bv; int_start = 1'b1;
      @(negedge clk);
      int_start = 1'b0;
      while (!int_done) @(negedge clk);
      checks++; n_int++;
      if (int_p !== 64'(av) * 64'(bv)) begin
        failures++;
        $display("integer mismatch %h * %h = %h", av, bv, int_p);
      end
    end
  end

  initial begin
    automatic bit prev_md = 1'b1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 24; n++) begin
      automatic bit md = (n % 3 == 0) ? ~prev_md : (($urandom % 2) == 1);
      automatic relem_t av = rand_elem(1'b1), bv = rand_elem(md);
      automatic relem_t exp_c;
      automatic int cycles = 0;
      if (md != prev_md) n_switch++;
      if (md) n_penta++; else n_tri++;
      if (!md && (av >> RM1) != 0) n_masked++;   // high bits must be ignored
      prev_md = md;
      @(negedge clk);
      gf_a = av; gf_b = bv; gf_mode = md ? FIELD_PENTA : FIELD_TRI; gf_start = 1'b1;
      @(negedge clk);
      gf_start = 1'b0;
      while (!gf_done) begin
        @(negedge clk);
        cycles++;
      end
      if (!md) av = av & ((relem_t'(1) << RM1) - 1);
      exp_c = gf_mul(av, bv, md);
      checks++;
      if (gf_c !== exp_c) begin
        failures++;
        $display("GF mismatch in op %0d (mode %0d)", n, md);
      end
      checks++;
      if (cycles != int'(D + W)) begin
        failures++;
        $display("GF latency %0d, expected %0d", cycles, D + W);
      end
    end
    gf_finished = 1'b1;
    repeat (10) @(negedge clk);
    $display("trinomial=%0d pentanomial=%0d field_switches=%0d masked_operands=%0d int=%0d overlap_cycles=%0d",
             n_tri, n_penta, n_switch, n_masked, n_int, n_overlap);
    if (n_tri == 0)     begin failures++; $display("no trinomial-field product"); end
    if (n_penta == 0)   begin failures++; $display("no pentanomial-field product"); end
    if (n_switch == 0)  begin failures++; $display("no field switch"); end
    if (n_masked == 0)  begin failures++; $display("no masked operand"); end
    if (n_int == 0)     begin failures++; $display("no integer product"); end
    if (n_overlap == 0) begin failures++; $display("multipliers never ran together"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
