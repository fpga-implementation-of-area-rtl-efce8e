// tb_fal - check of the first addition logic.
//
// The logic must return the carry-in-1 result of a group from its carry-in-0
// result, i.e. {cout1, sum1} = {cout0, sum0} + 1. Three instances are driven:
//  - 1 bit, with the half-adder outputs (carry,sum) 00, 01, 01, 10 of the four
//    input pairs, which must give 01, 10, 10, 11;
//  - the default 2 bits and 8 bits, with every {cout0, sum0} an adder can
//    produce (all but cout0 = 1 with all sum bits one).
// A watchdog guards the run.
module tb_fal;
  logic [0:0] s0_1, s1_1;
  logic [1:0] s0_2, s1_2;
  logic [7:0] s0_8, s1_8;
  logic       c0, c1_1, c1_2, c1_8;
  int         checks = 0, failures = 0;

  fal #(.WIDTH(1)) dut1 (.sum0(s0_1), .cout0(c0), .sum1(s1_1), .cout1(c1_1));
  fal              dut2 (.sum0(s0_2), .cout0(c0), .sum1(s1_2), .cout1(c1_2));
  fal #(.WIDTH(8)) dut8 (.sum0(s0_8), .cout0(c0), .sum1(s1_8), .cout1(c1_8));

  localparam logic [1:0] HA_OUT[4]  = '{2'b00, 2'b01, 2'b01, 2'b10};
  localparam logic [1:0] FAL_OUT[4] = '{2'b01, 2'b10, 2'b10, 2'b11};

  initial begin
    s0_2 = '0;
    s0_8 = '0;
    for (int i = 0; i < 4; i++) begin
      {c0, s0_1} = HA_OUT[i];
      #1;
      checks++;
      if ({c1_1, s1_1} !== FAL_OUT[i]) begin
        failures++;
        $display("FAIL 1-bit in=%b out=%b expected %b", HA_OUT[i], {c1_1, s1_1}, FAL_OUT[i]);
      end
    end
    // every value of {cout0, sum0} below 2^(W+1) - 1
    for (int v = 0; v < 511; v++) begin
      {c0, s0_8} = 9'(v);
      s0_2 = s0_8[1:0];
      s0_1 = s0_8[0:0];
      #1;
      checks++;
      if ({c1_8, s1_8} !== 9'(v + 1)) begin
        failures++;
        $display("FAIL 8-bit in=%0d out=%0d", v, {c1_8, s1_8});
      end
      if (s0_8[7:2] == 6'd0 || (c0 == 1'b0 && s0_8[7:2] == 6'h3f)) begin
        if (!(c0 && s0_2 == 2'b11)) begin
          checks++;
          if ({c1_2, s1_2} !== 3'({c0, s0_2} + 3'd1)) begin
            failures++;
            $display("FAIL 2-bit in=%b%b out=%b%b", c0, s0_2, c1_2, s1_2);
          end
        end
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
