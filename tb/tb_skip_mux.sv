// tb_skip_mux: exhaustive self-checking testbench for skip_mux.
//
// Applies every input combination, waits one time unit for the
// combinational outputs to settle, and compares them with the inverted selected carry (C0 when P*=1, C4 when P*=0)
// computed in the testbench. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_skip_mux;
  int checks = 0;
  int failures = 0;
  logic c4, c0, p_star, cout_n;

  skip_mux dut (.c4(c4), .c0(c0), .p_star(p_star), .cout_n(cout_n));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 8; v++) begin
      {p_star, c0, c4} = v[2:0];
      #1;
      checks++;
      if (cout_n !== (v[2] ? !v[1] : !v[0])) begin
        failures++;
        $display("FAIL v=%0d cout_n=%b expected %b", v, cout_n, (v[2] ? !v[1] : !v[0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
