// tb_fal_group - exhaustive check of one carry-select stage.
//
// Drives the default 2-bit stage and an 8-bit stage (the widest group of the
// 32-bit adder) with every a, b and select carry cin, and compares
// {cout, sum} with a + b + cin. It also counts how often the stage's output
// came from the carry-in-1 path by way of the all-ones case of the first
// addition logic (a + b = 2^W - 1 with cin = 1), and fails if that never
// happened. A watchdog guards the run.
module tb_fal_group;
  logic [1:0] a2, b2, s2;
  logic [7:0] a8, b8, s8;
  logic       cin, c2, c8;
  int         checks = 0, failures = 0, all_ones_hits = 0;

  fal_group              dut2 (.a(a2), .b(b2), .cin(cin), .sum(s2), .cout(c2));
  fal_group #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .cin(cin), .sum(s8), .cout(c8));

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {cin, a8, b8} = 17'(i);
      a2 = a8[1:0];
      b2 = b8[1:0];
      #1;
      checks++;
      if ({c8, s8} !== 9'(int'(a8) + int'(b8) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL 8-bit %0d+%0d+%0d -> %0d,%0d", a8, b8, cin, c8, s8);
      end
      if (cin && int'(a8) + int'(b8) == 255) all_ones_hits++;
      if (a8[7:2] == 6'd0 && b8[7:2] == 6'd0) begin
        checks++;
        if ({c2, s2} !== 3'(int'(a2) + int'(b2) + int'(cin))) begin
          failures++;
          $display("FAIL 2-bit %0d+%0d+%0d -> %0d,%0d", a2, b2, cin, c2, s2);
        end
      end
    end
    $display("all-ones carry through first addition logic: %0d", all_ones_hits);
    if (all_ones_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
