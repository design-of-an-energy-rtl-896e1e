// csa_adder32: 32-bit carry-skip adder, S = A + B + Cin.
//
// The operands are cut into eight fixed 4-bit carry-skip blocks. Inside a
// block the carry ripples through four full adders; if every bit of the block
// propagates (P* = 1) the block's carry in is passed straight to its carry
// out through a buffered mux. The worst case is therefore a carry that
// ripples through the first block, skips the six middle blocks and ripples
// through the last one. The blocks are grouped into 8-bit pairs (csa8) whose
// carries are true at both ends, and the pairs are simply cascaded.
//
// WIDTH defaults to the 32 bits of the design and must be a multiple of 8;
// wider settings repeat the same pair block.
// Interface: a, b, s WIDTH bits; cin, cout one bit, true polarity.
// Timing: purely combinational, no clock and no reset; one addition per
// settling of the inputs.
module csa_adder32
  import csa_pkg::*;
#(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NPAIRS = WIDTH / PAIR_BITS;

  // Carry between pairs: pair_c[k] is the carry into pair k (true polarity).
  logic [NPAIRS:0]    pair_c;

  if (WIDTH % PAIR_BITS != 0 || WIDTH == 0) begin : g_bad_width
    $error("csa_adder32: WIDTH must be a non-zero multiple of %0d", PAIR_BITS);
  end

  assign pair_c[0] = cin;

  for (genvar k = 0; k < NPAIRS; k++) begin : g_pair
    csa8 u_pair (
      .a (a[k*PAIR_BITS +: PAIR_BITS]),
      .b (b[k*PAIR_BITS +: PAIR_BITS]),
      .c0(pair_c[k]),
      .s (s[k*PAIR_BITS +: PAIR_BITS]),
      .c8(pair_c[k+1])
    );
  end

  assign cout = pair_c[NPAIRS];
endmodule
