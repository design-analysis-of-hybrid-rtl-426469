// tb_booth_r2_mult: checks the radix-2 Booth multiplier against the *
// operator: random and corner-case operands at the default width 16, and
// every operand pair at width 4.
module tb_booth_r2_mult;
  localparam int unsigned K  = 16;
  localparam int unsigned KS = 4;

  logic [K-1:0]    x, y;
  logic [2*K-1:0]  p;
  logic [KS-1:0]   xs, ys;
  logic [2*KS-1:0] ps;
  int checks = 0, failures = 0;

  booth_r2_mult dut (.*);
  booth_r2_mult #(.K(KS)) dut_s (.x(xs), .y(ys), .p(ps));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      case (n)
        0: begin x = '1; y = '1; end
        1: begin x = '0; y = '1; end
        2: begin x = '1; y = K'(1) << (K - 1); end
        3: begin x = K'({(K/2){2'b10}}); y = K'({(K/2){2'b01}}); end
        default: begin x = K'($urandom); y = K'($urandom); end
      endcase
      xs = KS'(n); ys = KS'(n >> KS);
      #1;
      checks++;
      if (p !== (2*K)'(x) * (2*K)'(y)) begin
        failures++;
        if (failures < 5) $display("mismatch %h * %h = %h", x, y, p);
      end
      if (n < (1 << (2*KS))) begin
        checks++;
        if (ps !== (2*KS)'(xs) * (2*KS)'(ys)) begin
          failures++;
          if (failures < 5) $display("small mismatch %h * %h = %h", xs, ys, ps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
