// tb_csa_adder32: end-to-end self-checking testbench for the 32-bit adder.
//
// The adder is used at its default width of 32 bits. The testbench applies
//   1. the worst-case transition: A goes from 0 to 1 while B goes from 0 to
//      0x7FFFFFFF, so a carry generated in block 0 skips blocks 1 to 6 and
//      ripples into block 7 (S31 rises);
//   2. a set of corner cases (all ones, carry in at the top, alternating bits);
//   3. 100 uniformly random operand pairs, the kind of stimulus used for the
//      average-power figures;
//   4. many random pairs biased towards long propagate runs, so that skips
//      over one or several blocks are frequent.
// Every result is compared with the 33-bit integer sum A + B + Cin, and the
// skip select P* of each block, read inside the adder, with whether that
// block's A xor B bits are all one. For each
// 4-bit block the testbench works out, from the operands alone, whether the
// block propagates (all four A xor B bits one) and which carry enters it, and
// counts: carries rippled out of a block, carries skipped past a block, the
// full six-block skip of the worst case, and additions with a carry out. It
// fails if any of these never happened. The adder is combinational, so each
// check is made one time unit after the inputs change.
module tb_csa_adder32;
  localparam int unsigned W = 32;
  localparam int unsigned NBLK = W / 4;

  int checks = 0;
  int failures = 0;
  int n_ripple = 0;     // a 1 carried out of a block that does not propagate
  int n_skip = 0;       // a 1 carried past a block whose P* = 1
  int n_long_skip = 0;  // a 1 carried past all six middle blocks
  int n_cout = 0;       // additions with carry out
  int n_random = 0;

  logic [W-1:0] a, b, s;
  logic         cin, cout;

  csa_adder32 dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  // Skip select of every 4-bit block, read inside the adder.
  logic [NBLK-1:0] dut_pstar;
  for (genvar k = 0; k < NBLK / 2; k++) begin : g_probe
    assign dut_pstar[2*k]   = dut.g_pair[k].u_pair.u_lo.p_star;
    assign dut_pstar[2*k+1] = dut.g_pair[k].u_pair.u_hi.p_star;
  end

  // Carry entering bit position 4*k, worked out from the operands.
  function automatic logic carry_into_block(input logic [W-1:0] x, input logic [W-1:0] y,
                                            input logic ci, input int k);
    longint unsigned mask, t;
    mask = (64'd1 << (4 * k)) - 64'd1;
    t = (longint'(x) & mask) + (longint'(y) & mask) + longint'(ci);
    return t[4*k];
  endfunction

  function automatic logic block_propagates(input logic [W-1:0] x, input logic [W-1:0] y,
                                            input int k);
    logic [W-1:0] p;
    p = x ^ y;
    return p[4*k +: 4] == 4'hF;
  endfunction

  task automatic apply(input logic [W-1:0] x, input logic [W-1:0] y, input logic ci);
    logic [W:0] sum;
    int         run;
    a   = x;
    b   = y;
    cin = ci;
    #1;
    sum = {1'b0, x} + {1'b0, y} + {{W{1'b0}}, ci};
    checks++;
    if (s !== sum[W-1:0] || cout !== sum[W]) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h cin=%b got s=%h cout=%b expected s=%h cout=%b",
                 x, y, ci, s, cout, sum[W-1:0], sum[W]);
    end
    if (sum[W]) n_cout++;
    run = 0;
    checks++;
    for (int k = 0; k < NBLK; k++)
      if (dut_pstar[k] !== block_propagates(x, y, k)) begin
        failures++;
        if (failures < 10) $display("FAIL P* of block %0d a=%h b=%h", k, x, y);
        break;
      end
    for (int k = 0; k < NBLK; k++) begin
      logic cin_k, cout_k;
      cin_k  = carry_into_block(x, y, ci, k);
      cout_k = (k == NBLK - 1) ? sum[W] : carry_into_block(x, y, ci, k + 1);
      if (block_propagates(x, y, k)) begin
        if (cin_k) n_skip++;
      end else if (cout_k) begin
        n_ripple++;
      end
    end
    // Worst-case path: carry generated in block 0, blocks 1..6 all skipped.
    if (!block_propagates(x, y, 0) && carry_into_block(x, y, ci, 1)) begin
      for (int k = 1; k < NBLK - 1; k++)
        if (block_propagates(x, y, k)) run++;
      if (run == NBLK - 2) n_long_skip++;
    end
  endtask

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [W-1:0] x, y, m;

    // 1. Worst-case transition.
    apply(32'h0000_0000, 32'h0000_0000, 1'b0);
    apply(32'h0000_0001, 32'h7FFF_FFFF, 1'b0);
    checks++;
    if (s !== 32'h8000_0000 || cout !== 1'b0) failures++;

    // 2. Corner cases.
    apply(32'hFFFF_FFFF, 32'h0000_0001, 1'b0);
    apply(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    apply(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b1);
    apply(32'hAAAA_AAAA, 32'h5555_5555, 1'b0);
    apply(32'h8000_0000, 32'h8000_0000, 1'b0);
    apply(32'h0F0F_0F0F, 32'h0F0F_0F0F, 1'b1);

    // 3. 100 uniformly random additions.
    for (int i = 0; i < 100; i++) begin
      apply($urandom, $urandom, 1'($urandom));
      n_random++;
    end

    // 4. Random additions biased towards long propagate runs: B is the
    //    complement of A with a few bits flipped.
    for (int i = 0; i < 200000; i++) begin
      x = $urandom;
      m = $urandom & $urandom & $urandom & $urandom;
      y = ~x ^ m;
      apply(x, y, 1'($urandom));
    end

    $display("ripple carries %0d, skipped carries %0d, six-block skips %0d, carry outs %0d, random %0d",
             n_ripple, n_skip, n_long_skip, n_cout, n_random);
    checks++;
    if (n_ripple == 0 || n_skip == 0 || n_long_skip == 0 || n_cout == 0 || n_random != 100)
      failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
