// csla_adder: W-bit carry-select adder, the final carry-propagate adder of
// the multipliers.
//
// The operands are cut into blocks of BLK bits (the last block may be
// shorter). The lowest block adds with the real carry-in. Every other block
// computes its sum twice in parallel, once for carry-in 0 and once for
// carry-in 1, and the carry coming out of the block below selects one of
// the two, so the carry ripples through one multiplexer per block instead of
// through every bit. The source design names a carry-select adder for the
// final addition; the block size is this design's choice. Combinational.
module csla_adder #(
  parameter int unsigned W   = 32,   // operand width
  parameter int unsigned BLK = 8     // bits per block
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  localparam int unsigned NB = (W + BLK - 1) / BLK;

  logic [NB:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned LO = k * BLK;
    localparam int unsigned HI = ((LO + BLK) < W ? (LO + BLK) : W) - 1;
    localparam int unsigned BW = HI - LO + 1;
    if (k == 0) begin : g_first
      logic [BW:0] r;
      assign r = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]} + {{BW{1'b0}}, c[0]};
      assign s[HI:LO] = r[BW-1:0];
      assign c[1]     = r[BW];
    end else begin : g_sel
      logic [BW:0] r0, r1;
      assign r0 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]};
      assign r1 = {1'b0, a[HI:LO]} + {1'b0, b[HI:LO]} + {{BW{1'b0}}, 1'b1};
      assign s[HI:LO] = c[k] ? r1[BW-1:0] : r0[BW-1:0];
      assign c[k+1]   = c[k] ? r1[BW]     : r0[BW];
    end
  end

  assign cout = c[NB];

endmodule
