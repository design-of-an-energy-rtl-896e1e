// tb_mirror_carry: exhaustive self-checking testbench for mirror_carry.
//
// Applies every input combination, waits one time unit for the
// combinational outputs to settle, and compares them with the inverted majority, from counting the ones among A, B, Ci
// computed in the testbench. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_mirror_carry;
  int checks = 0;
  int failures = 0;
  logic a, b, ci, co_n;
  int ones;

  mirror_carry dut (.a(a), .b(b), .ci(ci), .co_n(co_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 8; v++) begin
      {ci, b, a} = v[2:0];
      ones = int'(v[0]) + int'(v[1]) + int'(v[2]);
      #1;
      checks++;
      if (co_n !== (ones >= 2 ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL v=%0d co_n=%b expected %b", v, co_n, (ones >= 2 ? 1'b0 : 1'b1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
