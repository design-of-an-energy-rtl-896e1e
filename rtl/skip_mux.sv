// skip_mux: carry-skip output multiplexer of a 4-bit block, with buffer.
//
// Two transmission gates controlled by P* and P*-bar select the ripple-chain
// carry c4 when P* = 0 and the block carry in c0 when P* = 1 (the skip). An
// inverter after the transmission gates restores drive, so a carry that skips
// several blocks is re-buffered at every block; the price is that the block
// carry out leaves inverted (cout_n). The next block is built for an inverted
// carry in rather than adding a second inverter (see csa4, csa8).
// Interface: c4, c0, p_star in; cout_n out. Timing: combinational.
module skip_mux (
  input  logic c4,
  input  logic c0,
  input  logic p_star,
  output logic cout_n
);
  logic tg_node;  // common node of the two transmission gates

  assign tg_node = p_star ? c0 : c4;

  inv_min u_buf (.x(tg_node), .x_n(cout_n));
endmodule
