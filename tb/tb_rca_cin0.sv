// tb_rca_cin0 - exhaustive check of the carry-in-0 ripple adder.
//
// Runs the default 2-bit adder, a 1-bit one (a lone half adder) and a 6-bit
// one through every operand pair and compares {cout, sum} with the integer
// a + b. A watchdog guards the run.
module tb_rca_cin0;
  logic [0:0] a1, b1, s1;
  logic [1:0] a2, b2, s2;
  logic [5:0] a6, b6, s6;
  logic       c1, c2, c6;
  int         checks = 0, failures = 0;

  rca_cin0 #(.WIDTH(1)) dut1 (.a(a1), .b(b1), .sum(s1), .cout(c1));
  rca_cin0              dut2 (.a(a2), .b(b2), .sum(s2), .cout(c2));
  rca_cin0 #(.WIDTH(6)) dut6 (.a(a6), .b(b6), .sum(s6), .cout(c6));

  initial begin
    for (int i = 0; i < (1 << 12); i++) begin
      {a6, b6} = 12'(i);
      a2 = a6[1:0];
      b2 = b6[1:0];
      a1 = a6[0:0];
      b1 = b6[0:0];
      #1;
      checks += 3;
      if ({c1, s1} !== 2'(int'(a1) + int'(b1))) begin
        failures++;
        $display("FAIL 1-bit %0d+%0d -> %0d,%0d", a1, b1, c1, s1);
      end
      if ({c2, s2} !== 3'(int'(a2) + int'(b2))) begin
        failures++;
        $display("FAIL 2-bit %0d+%0d -> %0d,%0d", a2, b2, c2, s2);
      end
      if ({c6, s6} !== 7'(int'(a6) + int'(b6))) begin
        failures++;
        $display("FAIL 6-bit %0d+%0d -> %0d,%0d", a6, b6, c6, s6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
