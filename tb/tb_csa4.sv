// tb_csa4: exhaustive self-checking testbench for the 4-bit carry-skip block.
//
// Instantiates both polarity variants of csa4: one built for a true carry in
// (CIN_INV = 0) and one built for an inverted carry in (CIN_INV = 1). For all
// 512 combinations of A, B and the carry, the true-polarity carry is fed to
// the first and its complement to the second. The expected sum and carry come
// from the integer sum A + B + Cin; the first variant must return the carry
// out inverted and the second in true form. The block-propagate signal P*
// that selects the skip path is read inside each block and compared with
// "A xor B is all ones", since a wrong P* would otherwise not change any sum
// (when all bits propagate the rippled carry equals the carry in, so the skip
// only saves time). The testbench also counts how
// often all four bits propagate, so the skip path is seen carrying both a 0
// and a 1, and fails if either never happened.
module tb_csa4;
  int checks = 0;
  int failures = 0;
  int skips_one = 0;   // P* = 1 with carry in 1
  int skips_zero = 0;  // P* = 1 with carry in 0

  logic [3:0] a, b;
  logic       cin;
  logic [3:0] s_t, s_i;
  logic       cout_t_n, cout_i;
  logic [4:0] sum;

  csa4 #(.CIN_INV(1'b0)) dut_t (.a(a), .b(b), .c_in(cin),  .s(s_t), .c_out(cout_t_n));
  csa4 #(.CIN_INV(1'b1)) dut_i (.a(a), .b(b), .c_in(!cin), .s(s_i), .c_out(cout_i));

  task automatic check(input string what, input logic [3:0] got, input logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s a=%h b=%h cin=%b got %h expected %h", what, a, b, cin, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 512; v++) begin
      a   = v[3:0];
      b   = v[7:4];
      cin = v[8];
      #1;
      sum = 5'(a) + 5'(b) + 5'(cin);
      check("s (true c_in)", s_t, sum[3:0]);
      check("s (inverted c_in)", s_i, sum[3:0]);
      check("c_out_n (true c_in)", {3'b0, cout_t_n}, {3'b0, !sum[4]});
      check("c_out (inverted c_in)", {3'b0, cout_i}, {3'b0, sum[4]});
      // The skip select inside each block must equal "all bits propagate".
      check("P* (true c_in)", {3'b0, dut_t.p_star}, {3'b0, (a ^ b) == 4'hF});
      check("P* (inverted c_in)", {3'b0, dut_i.p_star}, {3'b0, (a ^ b) == 4'hF});
      if ((a ^ b) == 4'hF) begin
        if (cin) skips_one++;
        else     skips_zero++;
      end
    end
    $display("skips carrying 1: %0d, skips carrying 0: %0d", skips_one, skips_zero);
    checks++;
    if (skips_one == 0 || skips_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
