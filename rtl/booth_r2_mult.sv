// booth_r2_mult: the small multiplier, K x K-bit unsigned, with conventional
// (radix-2) Booth recoding.
//
// The multiplier y, read as a K+1-bit two's-complement number with a zero
// sign bit, is recoded into K+1 Booth digits d_i = y[i-1] - y[i] in
// {-1, 0, +1} (y[-1] = 0). Each digit selects 0, +x*2^i or -x*2^i as a
// partial product. A negative partial product is formed as the inverted,
// shifted multiplicand, and the +2^i that completes its two's complement is
// collected in one extra correction word (one bit per digit, all at
// different positions). The K+2 words go through a CSA tree and the final
// carry-select adder; all arithmetic is modulo 2^(2K), which holds the
// unsigned product exactly. Combinational. The source design gives the
// recoding scheme and the CSA/CSLA summation; widths and word layout are
// this design's.
module booth_r2_mult #(
  parameter int unsigned K = 16    // digit width k
) (
  input  logic [K-1:0]   x,
  input  logic [K-1:0]   y,
  output logic [2*K-1:0] p
);

  localparam int unsigned PW = 2 * K;
  localparam int unsigned NP = K + 1;        // Booth digits

  logic [PW-1:0] ops [NP+1];
  logic [PW-1:0] xs, sum_w, carry_w;
  logic [K+1:0]  ye;                          // {0, y, 0}: y[-1] and y[K] = 0
  logic          unused_cout;

  assign xs = PW'(x);
  assign ye = {1'b0, y, 1'b0};

  always_comb begin
    ops[NP] = '0;                             // two's-complement corrections
    for (int unsigned i = 0; i < NP; i++) begin
      // ye[i] is y[i-1], ye[i+1] is y[i]
      unique case ({ye[i+1], ye[i]})
        2'b01:   ops[i] = xs << i;            // +1
        2'b10: begin                          // -1
          ops[i]     = (~xs) << i;
          ops[NP][i] = 1'b1;
        end
        default: ops[i] = '0;                 // 0
      endcase
    end
  end

  csa_tree #(.N(NP + 1), .W(PW)) u_tree (
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
