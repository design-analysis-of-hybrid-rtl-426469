// hybrid_int_mult: N x N-bit unsigned digit-serial multiplier built from one
// small (k x k, conventional Booth) and one large ((k+1) x (k+1), modified
// Booth) digit multiplier, k = N/2.
//
// The operands are split into two k-bit digits, A = Ah*2^k + Al and
// B = Bh*2^k + Bl. The product is recombined as
//   A*B = H*2^(2k) + (M - H - L)*2^k + L,
//   L = Al*Bl, H = Ah*Bh (k-bit digits, small multiplier),
//   M = (Ah+Al)*(Bh+Bl)   ((k+1)-bit digits, large multiplier).
// The digits are processed serially: in the first cycle the small
// multiplier forms L while the large one forms M, in the second the small
// multiplier forms H. The third cycle feeds the five shifted terms (the
// subtractions as inverted words plus one correction word) to a CSA tree
// and adds sum and carry with a carry-select adder. The source design gives
// the digit size k = n/2, the two digit multipliers and their Booth
// schemes, the CSA tree and the CSLA; how the (k+1)-bit digit product is
// recombined is not given, and this three-product split is this design's
// choice, being the split in which (k+1)-bit digits arise from k = n/2.
//
// Interface: pulse start with a and b while busy is low; done pulses three
// cycles later with p valid, and p holds until the next result.
module hybrid_int_mult #(
  parameter int unsigned N = 32,      // operand width n
  parameter int unsigned K = N / 2    // digit width k
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic           busy,
  output logic           done,
  output logic [2*N-1:0] p
);

  localparam int unsigned PW = 2 * N;

  typedef enum logic [1:0] {S_IDLE, S_LO, S_HI, S_SUM} state_e;

  state_e            state_q;
  logic [K-1:0]      al_q, ah_q, bl_q, bh_q;
  logic [K:0]        sa_q, sb_q;            // Ah+Al, Bh+Bl
  logic [2*K-1:0]    l_q, h_q;
  logic [2*K+1:0]    m_q;
  logic [K-1:0]      sx, sy;
  logic [2*K-1:0]    sp;
  logic [2*K+1:0]    lp;
  logic [PW-1:0]     ops [6];
  logic [PW-1:0]     sum_w, carry_w, p_w;
  logic              unused_cout;

  initial assert (2 * K == N) else $error("N must be 2*K");

  assign busy = (state_q != S_IDLE);

  // Small multiplier: Al*Bl in S_LO, Ah*Bh in S_HI.
  assign sx = (state_q == S_LO) ? al_q : ah_q;
  assign sy = (state_q == S_LO) ? bl_q : bh_q;

  booth_r2_mult #(.K(K)) u_small (.x(sx), .y(sy), .p(sp));
  booth_r4_mult #(.K(K + 1)) u_large (.x(sa_q), .y(sb_q), .p(lp));

  // Recombination terms, modulo 2^(2N).
  always_comb begin
    ops[0] = PW'(h_q) << (2*K);
    ops[1] = PW'(l_q);
    ops[2] = PW'(m_q) << K;
    ops[3] = (~PW'(h_q)) << K;              // -H*2^k minus 2^k
    ops[4] = (~PW'(l_q)) << K;              // -L*2^k minus 2^k
    ops[5] = PW'(1) << (K + 1);             // the two 2^k corrections
  end

  csa_tree #(.N(6), .W(PW)) u_tree (.ops(ops), .sum(sum_w), .carry(carry_w));

  csla_adder #(.W(PW), .BLK(8)) u_add (
    .a(sum_w), .b(carry_w), .cin(1'b0), .s(p_w), .cout(unused_cout)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      done    <= 1'b0;
      al_q <= '0; ah_q <= '0; bl_q <= '0; bh_q <= '0;
      sa_q <= '0; sb_q <= '0;
      l_q  <= '0; h_q  <= '0; m_q  <= '0;
      p    <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (start) begin
          {ah_q, al_q} <= a;
          {bh_q, bl_q} <= b;
          sa_q    <= {1'b0, a[N-1:K]} + {1'b0, a[K-1:0]};
          sb_q    <= {1'b0, b[N-1:K]} + {1'b0, b[K-1:0]};
          state_q <= S_LO;
        end
        S_LO: begin
          l_q     <= sp;
          m_q     <= lp;
          state_q <= S_HI;
        end
        S_HI: begin
          h_q     <= sp;
          state_q <= S_SUM;
        end
        S_SUM: begin
          p       <= p_w;
          done    <= 1'b1;
          state_q <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

endmodule
