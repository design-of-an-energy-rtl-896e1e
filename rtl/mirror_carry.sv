// mirror_carry: mirror carry circuit of the full adder, Co-bar only.
//
// Computes the complement of the majority function,
//   co_n = NOT( A*B + Ci*(A + B) ),
// in a single inverting stage. The pull-down has two branches, A in series
// with B, and (A parallel B) in series with Ci; the pull-up mirrors them, so
// no stack is deeper than two transistors. The two product terms below are
// those two branches. Producing only the inverted carry is what lets the
// adder chain full adders without any inverter on the carry path: the next
// bit is built with inverted operands instead (see csa4).
// Interface: a, b, ci in; co_n out. Timing: combinational, one gate level.
module mirror_carry (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic co_n
);
  logic gen_branch;   // A in series with B
  logic prop_branch;  // (A parallel B) in series with Ci

  assign gen_branch  = a & b;
  assign prop_branch = (a | b) & ci;
  assign co_n        = ~(gen_branch | prop_branch);
endmodule
