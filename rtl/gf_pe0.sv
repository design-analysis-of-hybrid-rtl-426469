// gf_pe0: PE-0, the input data broadcasting cell of the hybrid field-size
// digit-serial systolic GF(2^m) multiplier.
//
// PE-0 holds one register R = A * x^t mod f(x), where t counts the w
// accumulation cycles of one multiplication (load sets R = A, every step
// multiplies it by x and reduces). From R it drives the broadcast bus:
// entry k-1 of the bus carries A * x^((k-1)*W + t) mod f(x), the operand that
// PE-k needs together with bit b_((k-1)*W + t) of B. Each systolic PE taps
// exactly one bus entry (the "selective connection"), so no operand is
// pipelined from PE to PE. That the bus is made by one register followed by
// constant multiply-by-x^W networks (rather than D registers) is this
// design's choice; the source design only shows PE-0 feeding the tapped
// values A_j^(0) .. A_j^(m2-1) to the array.
//
// Interface: load (with a, mode) starts a new operand; step advances t by
// one. bus is valid combinationally from R. mode is held by the caller for
// the whole multiplication. Operand a must be already reduced (bits >= M1
// zero in the trinomial field); gf_hybrid_mult masks it.
module gf_pe0
  import gf_pkg::*;
#(
  parameter int unsigned W = 16,   // digit size w: bits of B per PE
  parameter int unsigned D = 18    // number of systolic PEs d
) (
  input  logic   clk,
  input  logic   load,
  input  logic   step,
  input  field_e mode,
  input  elem_t  a,
  output elem_t  bus [D]
);

  elem_t r_q;

  always_ff @(posedge clk) begin
    if (load)      r_q <= a;
    else if (step) r_q <= mulx(r_q, mode);
  end

  // bus[k] = R * x^(k*W) mod f(x), built as a chain of x^W constant networks.
  always_comb begin
    bus[0] = r_q;
    for (int unsigned k = 1; k < D; k++) bus[k] = mulx_n(bus[k-1], mode, W);
  end

endmodule
