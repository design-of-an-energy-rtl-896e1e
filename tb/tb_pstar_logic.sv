// tb_pstar_logic: exhaustive self-checking testbench for pstar_logic.
//
// Applies every input combination, waits one time unit for the
// combinational outputs to settle, and compares them with a test for all four propagate bits being one
// computed in the testbench. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_pstar_logic;
  int checks = 0;
  int failures = 0;
  logic [3:0] p;
  logic p_star;

  pstar_logic dut (.p(p), .p_star(p_star));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 16; v++) begin
      p = v[3:0];
      #1;
      checks++;
      if (p_star !== (v == 15)) begin
        failures++;
        $display("FAIL v=%0d p_star=%b expected %b", v, p_star, (v == 15));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
