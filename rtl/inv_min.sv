// inv_min: minimum-size balanced inverter.
//
// In the transistor-level adder this is the reference gate: every other gate
// is sized so that its worst-case pull-up and pull-down match this inverter.
// It is also the buffer placed on inverted operand bits, on inverted sums and
// after the carry-skip mux. At the logic level it is X-bar = NOT X.
// Interface: x in, x_n out. Timing: combinational, no clock.
// The function and port names follow the circuit; transistor sizing is an
// electrical property and has no counterpart here.
module inv_min (
  input  logic x,
  output logic x_n
);
  assign x_n = ~x;
endmodule
