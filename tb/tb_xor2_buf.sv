// tb_xor2_buf: exhaustive self-checking testbench for xor2_buf.
//
// Applies every input combination, waits one time unit for the
// combinational outputs to settle, and compares them with a truth table of A xor B
// computed in the testbench. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_xor2_buf;
  int checks = 0;
  int failures = 0;
  logic a, b, y;
  localparam logic [3:0] TT = 4'b0110;  // index {b,a}

  xor2_buf dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 4; v++) begin
      {b, a} = v[1:0];
      #1;
      checks++;
      if (y !== (TT[v[1:0]])) begin
        failures++;
        $display("FAIL v=%0d y=%b expected %b", v, y, (TT[v[1:0]]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
