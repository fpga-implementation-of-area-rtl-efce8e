// tb_rca - exhaustive check of the ripple-carry adder.
//
// Runs the default 2-bit adder (the lowest group) and a 5-bit one through
// every combination of a, b and cin and compares {cout, sum} with the integer
// a + b + cin. A watchdog guards the run.
module tb_rca;
  logic [1:0] a2, b2, s2;
  logic [4:0] a5, b5, s5;
  logic       cin, c2, c5;
  int         checks = 0, failures = 0;

  rca dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(c2));
  rca #(.WIDTH(5)) dut5 (.a(a5), .b(b5), .cin(cin), .sum(s5), .cout(c5));

  initial begin
    for (int i = 0; i < (1 << 11); i++) begin
      {cin, a5, b5} = 11'(i);
      a2 = a5[1:0];
      b2 = b5[1:0];
      #1;
      if (b5[4:2] == 3'b000 && a5[4:2] == 3'b000) begin
        checks++;
        if ({c2, s2} !== 3'(int'(a2) + int'(b2) + int'(cin))) begin
          failures++;
          $display("FAIL 2-bit %0d+%0d+%0d -> %0d,%0d", a2, b2, cin, c2, s2);
        end
      end
      checks++;
      if ({c5, s5} !== 6'(int'(a5) + int'(b5) + int'(cin))) begin
        failures++;
        $display("FAIL 5-bit %0d+%0d+%0d -> %0d,%0d", a5, b5, cin, c5, s5);
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
