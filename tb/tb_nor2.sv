// tb_nor2: exhaustive self-checking testbench for nor2.
//
// Applies every input combination, waits one time unit for the
// combinational outputs to settle, and compares them with a truth table of NOT(X OR Y)
// computed in the testbench. A watchdog ends the run with a failure if it
// does not finish in time.
module tb_nor2;
  int checks = 0;
  int failures = 0;
  logic x, y, out;
  localparam logic [3:0] TT = 4'b0001;  // index {y,x}

  nor2 dut (.x(x), .y(y), .out(out));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int v = 0; v < 4; v++) begin
      {y, x} = v[1:0];
      #1;
      checks++;
      if (out !== (TT[v[1:0]])) begin
        failures++;
        $display("FAIL v=%0d out=%b expected %b", v, out, (TT[v[1:0]]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
