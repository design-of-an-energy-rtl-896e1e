// pstar_logic: block propagate P* = P3 P2 P1 P0 of a 4-bit carry-skip block.
//
// Built from two 2-input NAND gates (P3,P2 and P1,P0) and a 2-input NOR gate
// on their outputs: NOR(NAND(P3,P2), NAND(P1,P0)) = P3 P2 P1 P0. This avoids
// a 4-input AND, whose deep transistor stack would be weak and slow at
// subthreshold supply voltages. When P* = 1 every bit of the block
// propagates and the block carry in can skip the ripple chain.
// Interface: p[3:0] in; p_star out. Timing: combinational, two gate levels.
module pstar_logic (
  input  logic [3:0] p,
  output logic       p_star
);
  logic nand_hi;  // NAND(P3, P2)
  logic nand_lo;  // NAND(P1, P0)

  nand2 u_nand_hi (.x(p[3]), .y(p[2]), .out(nand_hi));
  nand2 u_nand_lo (.x(p[1]), .y(p[0]), .out(nand_lo));
  nor2  u_nor     (.x(nand_hi), .y(nand_lo), .out(p_star));
endmodule
