// tb_csa8: exhaustive self-checking testbench for the 8-bit pair block.
//
// Applies all 2^17 combinations of A, B and the carry in, and compares the
// sum and the true-polarity carry out with the integer sum A + B + C0. It
// counts the cases in which the upper block is skipped by an inverted carry
// coming from the lower block (P7..P4 all one) and the cases in which both
// blocks are skipped, and fails if either never occurred.
module tb_csa8;
  int checks = 0;
  int failures = 0;
  int skip_hi = 0;    // upper block skipped with a carry of 1 arriving
  int skip_both = 0;  // C0 = 1 skipped through both blocks

  logic [7:0] a, b, s;
  logic       c0, c8;
  logic [8:0] sum;

  csa8 dut (.a(a), .b(b), .c0(c0), .s(s), .c8(c8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < (1 << 17); v++) begin
      a  = v[7:0];
      b  = v[15:8];
      c0 = v[16];
      #1;
      sum = 9'(a) + 9'(b) + 9'(c0);
      checks++;
      if (s !== sum[7:0] || c8 !== sum[8]) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h c0=%b got s=%h c8=%b expected s=%h c8=%b",
                   a, b, c0, s, c8, sum[7:0], sum[8]);
      end
      if ((a[7:4] ^ b[7:4]) == 4'hF && ((5'(a[3:0]) + 5'(b[3:0]) + 5'(c0)) >> 4) == 5'd1)
        skip_hi++;
      if ((a ^ b) == 8'hFF && c0) skip_both++;
    end
    $display("upper-block skips: %0d, double skips: %0d", skip_hi, skip_both);
    checks++;
    if (skip_hi == 0 || skip_both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
