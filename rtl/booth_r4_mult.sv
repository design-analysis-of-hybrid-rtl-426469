// booth_r4_mult: the large multiplier, K x K-bit unsigned (K = k+1 in the
// hybrid multiplier), with modified (radix-4) Booth recoding.
//
// The multiplier y, zero-extended, is scanned in overlapping triplets
// (y[2i+1], y[2i], y[2i-1]), y[-1] = 0, giving G = K/2 + 1 digits in
// {-2, -1, 0, +1, +2}: about half the partial products of radix-2 Booth.
// Each digit selects 0, x or 2x, shifted by 2i, and inverted when negative;
// the +2^(2i) completing a negative product goes into one correction word.
// The G+1 words are reduced by a CSA tree and added by the carry-select
// adder, modulo 2^(2K). Combinational. The source design gives the recoding
// scheme and the CSA/CSLA summation; widths and word layout are this
// design's.
module booth_r4_mult #(
  parameter int unsigned K = 17    // digit width k+1
) (
  input  logic [K-1:0]   x,
  input  logic [K-1:0]   y,
  output logic [2*K-1:0] p
);

  localparam int unsigned PW = 2 * K;
  localparam int unsigned G  = K / 2 + 1;    // radix-4 Booth digits

  logic [PW-1:0] ops [G+1];
  logic [PW-1:0] xs, sum_w, carry_w;
  logic [2*G:0]  ye;                          // {zeros, y, 0}
  logic          unused_cout;

  assign xs = PW'(x);
  assign ye = {(2*G - K)'(0), y, 1'b0};

  always_comb begin
    ops[G] = '0;
    for (int unsigned i = 0; i < G; i++) begin
      // triplet {y[2i+1], y[2i], y[2i-1]} = ye[2i+2 : 2i]
      unique case (ye[2*i+2 -: 3])
        3'b001, 3'b010: ops[i] = xs << (2*i);          // +1
        3'b011:         ops[i] = xs << (2*i + 1);      // +2
        3'b100: begin                                  // -2
          ops[i]         = (~(xs << 1)) << (2*i);
          ops[G][2*i]    = 1'b1;
        end
        3'b101, 3'b110: begin                          // -1
          ops[i]         = (~xs) << (2*i);
          ops[G][2*i]    = 1'b1;
        end
        default:        ops[i] = '0;                   // 0
      endcase
    end
  end

  csa_tree #(.N(G + 1), .W(PW)) u_tree (
    .ops   (ops),
    .sum   (sum_w),
    .carry (carry_w)
  );

  csla_adder #(.W(PW), .BLK(8)) u_add (
    .a    (sum_w),
    .b    (carry_w),
    .cin  (1'b0),
    .s    (p),
    .cout (unused_cout)
  );

endmodule
