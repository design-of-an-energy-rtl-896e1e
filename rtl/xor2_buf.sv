// xor2_buf: output-buffered transmission-gate XOR, y = A xor B.
//
// A is inverted (a_n) and inverted again (a_t). Two transmission gates
// steered by B and B-bar choose a_n when B = 0 and a_t when B = 1 onto the
// internal node x_n, and an output inverter drives y. The net result is
// y = A when B = 0 and y = NOT A when B = 1. The output inverter is there
// for drive strength: without it the sum output of the adder falls short of
// a full logic level at very low supply voltages. Here the nodes are kept as
// named signals so the structure stays readable; the function is an XOR.
// Interface: a, b in; y out. Timing: combinational, no clock.
module xor2_buf (
  input  logic a,
  input  logic b,
  output logic y
);
  logic a_n;  // first input inverter
  logic a_t;  // second inverter, A restored
  logic x_n;  // transmission-gate node

  inv_min u_inv_a  (.x(a),   .x_n(a_n));
  inv_min u_inv_at (.x(a_n), .x_n(a_t));

  // Transmission-gate pair: B = 0 passes a_n, B = 1 passes a_t.
  assign x_n = b ? a_t : a_n;

  inv_min u_inv_out (.x(x_n), .x_n(y));
endmodule
