// gf_hybrid_mult: hybrid field-size digit-serial systolic multiplier over
// GF(2^m), for a trinomial field GF(2^M1) and a pentanomial field GF(2^M2)
// selected per operation by mode.
//
// C = A*B mod f(x) is computed as C = sum_i b_i * (A*x^i mod f(x)). B is cut
// into D digits of W bits (D = ceil(M2/W), the top digit zero-padded). PE-k
// (k = 1..D) handles digit k-1: over W cycles it receives one bit of its
// digit and, from the PE-0 broadcast bus, the operand A*x^((k-1)W+t) mod f(x),
// and accumulates their products. The D accumulators are then summed by
// passing one partial sum through PE-1 -> PE-2 -> ... -> PE-D, one PE per
// cycle, so the result leaves PE-D d + w cycles after the operands were
// loaded, as in the source design. In the trinomial field the digits above
// ceil(M1/W) are zero and their PEs only forward the partial sum.
//
// Interface: pulse start with a, b and mode while busy is low. done pulses
// d+w cycles after the start cycle; c is valid from then until one cycle
// after the next start. Operand bits at or above the field degree are
// ignored. One multiplication at a time (no overlapping of operations):
// that, the controller, and the reset values are this design's choices.
module gf_hybrid_mult
  import gf_pkg::*;
#(
  parameter int unsigned W = 16,                 // digit size w
  parameter int unsigned D = (M2 + W - 1) / W    // number of systolic PEs d
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  field_e mode,
  input  elem_t  a,
  input  elem_t  b,
  output logic   busy,
  output logic   done,
  output elem_t  c
);

  localparam int unsigned BW = D * W;            // padded width of B
  localparam int unsigned CW = (W > D ? W : D) > 1 ? $clog2(W > D ? W : D) : 1;

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_PROP} state_e;

  state_e          state_q;
  logic [CW-1:0]   cnt_q;
  field_e          mode_q;
  logic [BW-1:0]   b_q;
  logic            load;
  elem_t           a_in, b_in;
  elem_t           bus [D];
  elem_t           psum [D+1];

  initial assert (D * W >= M2) else $error("D*W must cover M2");

  assign load = start && (state_q == S_IDLE);
  assign a_in = (mode == FIELD_TRI) ? (a & M1_MASK) : a;
  assign b_in = (mode == FIELD_TRI) ? (b & M1_MASK) : b;
  assign busy = (state_q != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      cnt_q   <= '0;
      mode_q  <= FIELD_PENTA;
      done    <= 1'b0;
      b_q     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state_q)
        S_IDLE: if (load) begin
          state_q <= S_ACC;
          cnt_q   <= '0;
          mode_q  <= mode;
          b_q     <= BW'(b_in);
        end
        S_ACC: begin
          b_q <= b_q >> 1;                       // next bit of every digit
          if (cnt_q == CW'(W - 1)) begin
            state_q <= S_PROP;
            cnt_q   <= '0;
          end else cnt_q <= cnt_q + 1'b1;
        end
        S_PROP: begin
          if (cnt_q == CW'(D - 1)) begin
            state_q <= S_IDLE;
            done    <= 1'b1;
          end else cnt_q <= cnt_q + 1'b1;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  gf_pe0 #(.W(W), .D(D)) u_pe0 (
    .clk  (clk),
    .load (load),
    .step (state_q == S_ACC),
    .mode (mode_q),
    .a    (a_in),
    .bus  (bus)
  );

  assign psum[0] = '0;

  for (genvar k = 0; k < D; k++) begin : g_pe
    gf_pe u_pe (
      .clk      (clk),
      .clr      (load),
      .acc_en   (state_q == S_ACC),
      .b_bit    (b_q[k*W]),
      .a_in     (bus[k]),                        // selective connection
      .psum_in  (psum[k]),
      .psum_out (psum[k+1])
    );
  end

  assign c = psum[D];

  // In the trinomial field the result never has bits at or above M1.
  always_ff @(posedge clk)
    if (done && mode_q == FIELD_TRI)
      assert ((c & ~M1_MASK) == '0) else $error("result exceeds field degree M1");

endmodule
