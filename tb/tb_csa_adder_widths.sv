// tb_csa_adder_widths: checks the adder's WIDTH parameter at 8, 16 and 64 bits.
//
// The adder is built from 8-bit pair blocks, so any multiple of 8 is legal;
// 64 bits is the wider precision the architecture is meant to extend to.
// Each instance gets the same random operands (truncated to its width) and
// its sum and carry out are compared with the integer sum. Every 16th
// addition forces A xor B to all ones so that carries skip across every
// block of every instance.
module tb_csa_adder_widths;
  int checks = 0;
  int failures = 0;

  logic [63:0] a, b;
  logic        cin;
  logic [7:0]  s8;
  logic [15:0] s16;
  logic [63:0] s64;
  logic        co8, co16, co64;

  csa_adder32 #(.WIDTH(8))  dut8  (.a(a[7:0]),  .b(b[7:0]),  .cin(cin), .s(s8),  .cout(co8));
  csa_adder32 #(.WIDTH(16)) dut16 (.a(a[15:0]), .b(b[15:0]), .cin(cin), .s(s16), .cout(co16));
  csa_adder32 #(.WIDTH(64)) dut64 (.a(a),       .b(b),       .cin(cin), .s(s64), .cout(co64));

  task automatic check(input string what, input logic [64:0] got, input logic [64:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%h b=%h cin=%b got %h expected %h", what, a, b, cin, got, exp);
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    logic [8:0]  e8;
    logic [16:0] e16;
    logic [64:0] e64;
    for (int i = 0; i < 20000; i++) begin
      a   = {$urandom, $urandom};
      b   = (i % 16 == 0) ? ~a : {$urandom, $urandom};
      cin = 1'($urandom);
      #1;
      e8  = {1'b0, a[7:0]}  + {1'b0, b[7:0]}  + 9'(cin);
      e16 = {1'b0, a[15:0]} + {1'b0, b[15:0]} + 17'(cin);
      e64 = {1'b0, a}       + {1'b0, b}       + 65'(cin);
      check("width 8",  65'({co8, s8}),   65'(e8));
      check("width 16", 65'({co16, s16}), 65'(e16));
      check("width 64", {co64, s64},      e64);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
