// nor2: 2-input NOR gate, Out = NOT(X OR Y).
//
// Combines the two NAND outputs of the block-propagate logic into P*.
// Interface: x, y in; out out. Timing: combinational, no clock.
// Function and port names follow the circuit; sizing is not modelled.
module nor2 (
  input  logic x,
  input  logic y,
  output logic out
);
  assign out = ~(x | y);
endmodule
