// csa8: 8-bit adder block made of two 4-bit carry-skip blocks.
//
// The lower block takes the true carry in c0 and, because its skip mux ends
// in an inverter, hands C4-bar to the upper block. The upper block is built
// for an inverted carry in (its even bits get inverted operands), so it needs
// no inverter between the two blocks, and its own buffered mux turns the
// inverted carry back into a true C8. Each pair therefore has true carries at
// both ends and pairs can be cascaded directly.
// Interface: a, b, s 8 bits wide; c0 in and c8 out,
// both true polarity. Timing: combinational, no clock.
module csa8
  import csa_pkg::*;
(
  input  logic [PAIR_BITS-1:0] a,
  input  logic [PAIR_BITS-1:0] b,
  input  logic                 c0,
  output logic [PAIR_BITS-1:0] s,
  output logic                 c8
);
  logic c4_n;        // inverted carry between the two blocks

  csa4 #(.CIN_INV(1'b0)) u_lo (
    .a     (a[BLOCK_BITS-1:0]),
    .b     (b[BLOCK_BITS-1:0]),
    .c_in  (c0),
    .s     (s[BLOCK_BITS-1:0]),
    .c_out (c4_n)
  );

  csa4 #(.CIN_INV(1'b1)) u_hi (
    .a     (a[PAIR_BITS-1:BLOCK_BITS]),
    .b     (b[PAIR_BITS-1:BLOCK_BITS]),
    .c_in  (c4_n),
    .s     (s[PAIR_BITS-1:BLOCK_BITS]),
    .c_out (c8)
  );
endmodule
