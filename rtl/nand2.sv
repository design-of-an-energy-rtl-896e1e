// nand2: 2-input NAND gate, Out = NOT(X AND Y).
//
// One of the two gate types the block propagate P* is built from (the other
// is nor2), chosen instead of a wide AND because two-transistor stacks keep
// a usable on/off current ratio at subthreshold supply voltages.
// Interface: x, y in; out out. Timing: combinational, no clock.
// Function and port names follow the circuit; sizing is not modelled.
module nand2 (
  input  logic x,
  input  logic y,
  output logic out
);
  assign out = ~(x & y);
endmodule
