// tb_csla_adder: compares the carry-select adder with the + operator for
// random operands, all carry-ins and carry-chain corner cases, on the
// default 32-bit/8-bit-block adder and on a 13-bit adder with 5-bit blocks
// (short last block).
module tb_csla_adder;
  logic [31:0] a, b, s;
  logic        cin, cout;
  logic [12:0] a13, b13, s13;
  logic        cout13;
  int checks = 0, failures = 0;

  csla_adder dut (.*);
  csla_adder #(.W(13), .BLK(5)) dut13 (.a(a13), .b(b13), .cin(cin), .s(s13), .cout(cout13));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: begin a = '1; b = '0; end
        1: begin a = '1; b = 1;  end
        2: begin a = 32'h00FF_FF00; b = 32'h0000_0100; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      cin = n[0] ^ n[5];
      a13 = 13'(a); b13 = 13'(b);
      #1;
      checks++;
      if ({cout, s} !== ({1'b0, a} + {1'b0, b} + 33'(cin))) begin
        failures++;
        if (failures < 5) $display("32-bit mismatch %h + %h + %0d", a, b, cin);
      end
      checks++;
      if ({cout13, s13} !== ({1'b0, a13} + {1'b0, b13} + 14'(cin))) begin
        failures++;
        if (failures < 5) $display("13-bit mismatch");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
