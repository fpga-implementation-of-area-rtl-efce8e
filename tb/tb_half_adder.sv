// tb_half_adder - exhaustive check of the half adder.
//
// Applies all four input pairs and compares {carry, sum} with a + b worked
// out by the testbench, and with the truth table HA 00->00, 01->01, 10->01,
// 11->10. A watchdog ends the run with a failure if it ever hangs.
module tb_half_adder;
  logic a, b, sum, carry;
  int   checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  // expected {carry,sum} for inputs {a,b} = 00, 01, 10, 11
  localparam logic [1:0] TABLE[4] = '{2'b00, 2'b01, 2'b01, 2'b10};

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} !== TABLE[i] || {carry, sum} !== 2'(int'(a) + int'(b))) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> carry=%0b sum=%0b", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
