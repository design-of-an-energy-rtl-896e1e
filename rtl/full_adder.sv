// full_adder: 1-bit full adder with carry-skip propagate signal.
//
//   P    = A xor B            (one buffered XOR)
//   S    = P xor Ci           (second buffered XOR)
//   Co_n = NOT(AB + Ci(A+B))  (mirror circuit, inverted carry only)
//
// The carry is the critical path and leaves in inverted form after a single
// gate. Because inverting A, B and Ci leaves P unchanged and inverts both S
// and Co, the next bit of a chain takes the inverted carry directly and is fed
// inverted operands; its sum is then inverted once more outside this module.
// Interface: a, b, ci in; s, p, co_n out. Timing: combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic p,
  output logic co_n
);
  xor2_buf     u_xor_p (.a(a), .b(b),  .y(p));
  xor2_buf     u_xor_s (.a(p), .b(ci), .y(s));
  mirror_carry u_carry (.a(a), .b(b), .ci(ci), .co_n(co_n));
endmodule
