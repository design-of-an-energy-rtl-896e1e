// csa_pkg: constants shared by the carry-skip adder modules.
//
// The adder is cut into fixed 4-bit carry-skip blocks, and two of them, one
// built for a true carry in and one for an inverted carry in, form an 8-bit
// pair whose carry in and carry out are both of true polarity. The 4-bit
// block size and the pairing come from the adder's architecture; nothing
// here is configurable at elaboration time.
package csa_pkg;
  localparam int unsigned BLOCK_BITS = 4;               // bits per carry-skip block
  localparam int unsigned PAIR_BITS  = 2 * BLOCK_BITS;  // bits per 8-bit pair block
endpackage
