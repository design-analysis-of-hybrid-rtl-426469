// hsds_top: top level holding the two hybrid-size multipliers side by side.
//
//  - gf_hybrid_mult: digit-serial systolic multiplier over GF(2^M1)
//    (trinomial) or GF(2^M2) (pentanomial), chosen per operation, result
//    d + w cycles after start.
//  - hybrid_int_mult: N x N-bit unsigned integer multiplier from one small
//    (k-bit, conventional Booth) and one large ((k+1)-bit, modified Booth)
//    digit multiplier, CSA tree and carry-select adder, result 3 cycles
//    after start.
// The two share only clock and reset; each has its own start/busy/done
// handshake as described in its own module.
module hsds_top
  import gf_pkg::*;
#(
  parameter int unsigned GF_W  = 16,   // GF digit size w
  parameter int unsigned INT_N = 32    // integer operand width n
) (
  input  logic             clk,
  input  logic             rst_n,
  // finite-field multiplier
  input  logic             gf_start,
  input  field_e           gf_mode,
  input  elem_t            gf_a,
  input  elem_t            gf_b,
  output logic             gf_busy,
  output logic             gf_done,
  output elem_t            gf_c,
  // integer multiplier
  input  logic             int_start,
  input  logic [INT_N-1:0] int_a,
  input  logic [INT_N-1:0] int_b,
  output logic             int_busy,
  output logic             int_done,
  output logic [2*INT_N-1:0] int_p
);

  gf_hybrid_mult #(.W(GF_W)) u_gf (
    .clk(clk), .rst_n(rst_n), .start(gf_start), .mode(gf_mode),
    .a(gf_a), .b(gf_b), .busy(gf_busy), .done(gf_done), .c(gf_c)
  );

  hybrid_int_mult #(.N(INT_N)) u_int (
    .clk(clk), .rst_n(rst_n), .start(int_start), .a(int_a), .b(int_b),
    .busy(int_busy), .done(int_done), .p(int_p)
  );

endmodule
