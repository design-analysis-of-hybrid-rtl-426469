// gf_pe: one processing element PE-k of the systolic array of the hybrid
// field-size digit-serial GF(2^m) multiplier.
//
// PE-k owns one w-bit digit of B. During the w accumulation cycles it gets
// one bit b_i of that digit per cycle (serial, 1 bit wide as in the source
// design) together with the matching broadcast operand A^(i) = A*x^i mod f(x)
// from PE-0, and accumulates acc ^= b_i & A^(i) (addition in GF(2^m) is XOR).
// Every cycle it also registers psum_out = psum_in ^ acc, so the partial sum
// travels one PE to the right per cycle and has collected all d digits when
// it leaves PE-d, d cycles after accumulation ends. Only this one signal is
// passed from PE to PE.
//
// Timing: clr clears acc (one cycle, at operand load). acc_en enables the
// accumulation. psum_out is one register stage after psum_in.
module gf_pe
  import gf_pkg::*;
(
  input  logic  clk,
  input  logic  clr,
  input  logic  acc_en,
  input  logic  b_bit,
  input  elem_t a_in,
  input  elem_t psum_in,
  output elem_t psum_out
);

  elem_t acc_q;

  always_ff @(posedge clk) begin
    if (clr)                  acc_q <= '0;
    else if (acc_en && b_bit) acc_q <= acc_q ^ a_in;
  end

  always_ff @(posedge clk) psum_out <= psum_in ^ acc_q;

endmodule
