// csa4: 4-bit carry-skip adder block.
//
// Four full adders ripple a carry from bit 0 to bit 3. Each full adder gives
// its carry out inverted (mirror circuit), so the carry reaching a bit
// alternates between true and inverted form along the chain. A bit that
// receives an inverted carry is fed inverted operands (input inverters) and
// its sum, which then comes out inverted, passes an output inverter; its
// propagate P needs no correction. No inverter sits on the carry path.
//
// The block propagate P* = P3 P2 P1 P0 drives a transmission-gate mux: P* = 0
// selects the carry rippled out of bit 3, P* = 1 selects the block carry in
// (the skip). The mux is followed by an inverter, so the block carry out is
// always the opposite polarity of the block carry in.
//
// CIN_INV selects the polarity the block is built for:
//   CIN_INV = 0: c_in is true; bits 1 and 3 have inverted operands and sums,
//                c_out is inverted.
//   CIN_INV = 1: c_in is inverted; bits 0 and 2 have inverted operands and
//                sums, c_out is true.
// Both variants appear in the 8-bit pair (csa8); the parameter is this
// design's way of writing them as one module.
// Interface: a, b, s in true polarity; c_in / c_out polarity as above.
// Timing: combinational, no clock.
module csa4 #(
  parameter bit CIN_INV = 1'b0
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       c_in,
  output logic [3:0] s,
  output logic       c_out
);
  // Carry reaching each bit, in the polarity it physically has there.
  logic c1, c2, c3, c4;
  logic [3:0] fa_ci;   // carry into bit i
  logic [3:0] fa_co_n; // mirror output of bit i
  logic [3:0] fa_s;    // sum as produced by the full adder of bit i
  logic [3:0] p;       // per-bit propagate P3..P0
  logic       p_star;  // block propagate P*

  assign fa_ci = {c3, c2, c1, c_in};
  assign c1    = fa_co_n[0];
  assign c2    = fa_co_n[1];
  assign c3    = fa_co_n[2];
  assign c4    = fa_co_n[3];

  for (genvar i = 0; i < 4; i++) begin : g_bit
    // The carry into bit i is inverted when i + CIN_INV is odd.
    localparam bit INV = bit'((i + int'(CIN_INV)) % 2);
    logic a_i, b_i;
    if (INV) begin : g_inv
      inv_min u_inv_a (.x(a[i]),    .x_n(a_i));
      inv_min u_inv_b (.x(b[i]),    .x_n(b_i));
      inv_min u_inv_s (.x(fa_s[i]), .x_n(s[i]));
    end else begin : g_true
      assign a_i  = a[i];
      assign b_i  = b[i];
      assign s[i] = fa_s[i];
    end
    full_adder u_fa (
      .a   (a_i),
      .b   (b_i),
      .ci  (fa_ci[i]),
      .s   (fa_s[i]),
      .p   (p[i]),
      .co_n(fa_co_n[i])
    );
  end

  pstar_logic u_pstar (.p(p), .p_star(p_star));

  // c4 and c_in have the same polarity (four inversions apart).
  skip_mux u_mux (.c4(c4), .c0(c_in), .p_star(p_star), .cout_n(c_out));
endmodule
