// tb_sqrt_csla_fal_8bit - the adder built as an 8-bit square-root carry-select
// adder (groups of 2-2-4 bits), checked exhaustively.
//
// Every a, b and cin (2^17 cases) is applied and {cout, s} compared with
// a + b + cin, including the reference case ad + ef + 1 = 1_9d. For both
// carry-select groups it counts the carry-in-0 selections, the carry-in-1
// selections and the all-ones carries of the first addition logic, and fails
// if one never happens. A watchdog guards the run.
module tb_sqrt_csla_fal_8bit;
  logic [7:0] a, b, s;
  logic       cin, cout;
  int         checks = 0, failures = 0;
  int         sel0_g2 = 0, sel1_g2 = 0, ones_g2 = 0, sel0_g3 = 0, sel1_g3 = 0, ones_g3 = 0;

  sqrt_csla_fal #(
    .NUM_GROUPS (3),
    .GROUP_SIZES({8'd4, 8'd2, 8'd2}),
    .WIDTH      (8)
  ) dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      automatic logic c2, c4;
      {cin, a, b} = 17'(i);
      #1;
      checks++;
      if ({cout, s} !== 9'(int'(a) + int'(b) + int'(cin))) begin
        failures++;
        if (failures < 10) $display("FAIL %h + %h + %0b -> %0b_%h", a, b, cin, cout, s);
      end
      c2 = 1'((int'(a[1:0]) + int'(b[1:0]) + int'(cin)) >> 2);
      c4 = 1'((int'(a[3:0]) + int'(b[3:0]) + int'(cin)) >> 4);
      if (c2) begin
        sel1_g2++;
        if (int'(a[3:2]) + int'(b[3:2]) == 3) ones_g2++;
      end else sel0_g2++;
      if (c4) begin
        sel1_g3++;
        if (int'(a[7:4]) + int'(b[7:4]) == 15) ones_g3++;
      end else sel0_g3++;
    end
    a = 8'had; b = 8'hef; cin = 1'b1;
    #1;
    checks++;
    if ({cout, s} !== 9'h19d) begin
      failures++;
      $display("FAIL ad + ef + 1 -> %0b_%h", cout, s);
    end
    $display("group 2: %0d / %0d / %0d, group 3: %0d / %0d / %0d (carry-in-0 / carry-in-1 / all-ones)",
             sel0_g2, sel1_g2, ones_g2, sel0_g3, sel1_g3, ones_g3);
    if (sel0_g2 == 0 || sel1_g2 == 0 || ones_g2 == 0 ||
        sel0_g3 == 0 || sel1_g3 == 0 || ones_g3 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
