// tb_gf_pe0: loads random operands into PE-0 in both fields, steps it
// through all W positions and compares every broadcast bus entry with
// A * x^(k*W + t) mod f(x) from the reference model.
module tb_gf_pe0;
  import gf_pkg::*;
  import tb_ref_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned D = 18;

  logic   clk = 1'b0;
  logic   load = 1'b0, step = 1'b0;
  field_e mode = FIELD_PENTA;
  elem_t  a = '0;
  elem_t  bus [D];
  int     checks = 0, failures = 0;

  gf_pe0 #(.W(W), .D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    relem_t av;
    for (int n = 0; n < 8; n++) begin
      automatic bit md = n[0];
      av = (n < 2) ? relem_t'(1) : rand_elem(md);
      @(negedge clk);
      mode = md ? FIELD_PENTA : FIELD_TRI;
      a = av; load = 1'b1; step = 1'b0;
      @(negedge clk);
      load = 1'b0; step = 1'b1;
      for (int t = 0; t < int'(W); t++) begin
        for (int k = 0; k < int'(D); k++) begin
          automatic relem_t exp_v = gf_mul(av, xpow(k * W + t, md), md);
          checks++;
          if (bus[k] !== exp_v) begin
            failures++;
            if (failures < 5) $display("mismatch op %0d t=%0d k=%0d", n, t, k);
          end
        end
        @(negedge clk);
      end
      step = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
