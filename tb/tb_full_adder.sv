// tb_full_adder: exhaustive self-checking testbench for full_adder.
//
// Applies every input combination, waits one time unit for the
// combinational outputs to settle, and compares them with the two-bit arithmetic sum A + B + Ci and A != B
// computed in the testbench. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_full_adder;
  int checks = 0;
  int failures = 0;
  logic a, b, ci, s, p, co_n;
  logic [1:0] sum;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .p(p), .co_n(co_n));

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
      sum = 2'(v[0]) + 2'(v[1]) + 2'(v[2]);
      #1;
      checks++;
      if (s !== (sum[0])) begin
        failures++;
        $display("FAIL v=%0d s=%b expected %b", v, s, (sum[0]));
      end
      checks++;
      if (co_n !== (!sum[1])) begin
        failures++;
        $display("FAIL v=%0d co_n=%b expected %b", v, co_n, (!sum[1]));
      end
      checks++;
      if (p !== (a != b)) begin
        failures++;
        $display("FAIL v=%0d p=%b expected %b", v, p, (a != b));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
