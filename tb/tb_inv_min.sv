// tb_inv_min: exhaustive self-checking testbench for inv_min.
//
// Applies every input combination, waits one time unit for the
// combinational outputs to settle, and compares them with the complement of the input
// computed in the testbench. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_inv_min;
  int checks = 0;
  int failures = 0;
  logic x, x_n;

  inv_min dut (.x(x), .x_n(x_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 2; v++) begin
      x = v[0];
      #1;
      checks++;
      if (x_n !== (v[0] ? 1'b0 : 1'b1)) begin
        failures++;
        $display("FAIL v=%0d x_n=%b expected %b", v, x_n, (v[0] ? 1'b0 : 1'b1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
