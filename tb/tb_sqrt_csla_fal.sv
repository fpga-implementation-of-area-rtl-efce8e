// tb_sqrt_csla_fal - end-to-end check of the 32-bit adder at its default
// parameters (seven groups of 2-2-3-4-6-7-8 bits).
//
// Stimulus:
//  - the operand sets of the reference waveforms: f321eedc + 2213fcbd with
//    cin 0 and 1, ffffffff + 2213fcbd + 1 and ffffffff + 00001101 + 1;
//  - a carry entering at cin and rippling through every group
//    (ffffffff + 00000000 + 1) and the largest sum (ffffffff + ffffffff + 1);
//  - NUM_VECTORS operand pairs in which every group's slice is, at random,
//    random, all-propagate (a = ~b), all-generate or all-kill, so that every
//    select and carry path is taken.
// Each {cout, s} is compared with the 33-bit integer a + b + cin.
//
// For every carry-select group it counts how often the group's multiplexer
// picked the carry-in-0 result, the carry-in-1 result, and the carry-in-1
// result whose carry out comes from the all-ones rule of the first addition
// logic; it also counts carries that ripple from cin to cout. Each of these
// must happen at least once. A watchdog ends a hung run with a failure.
module tb_sqrt_csla_fal;
  localparam int NUM_GROUPS  = 7;
  localparam int SIZES[7]    = '{2, 2, 3, 4, 6, 7, 8};
  localparam int NUM_VECTORS = 200000;

  logic [31:0] a, b, s;
  logic        cin, cout;
  int          checks = 0, failures = 0;
  int          sel0_hits[NUM_GROUPS], sel1_hits[NUM_GROUPS], fal_carry_hits[NUM_GROUPS];
  int          full_ripple_hits = 0;

  sqrt_csla_fal dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  function automatic int lsb_of(int g);
    int acc = 0;
    for (int i = 0; i < g; i++) acc += SIZES[i];
    return acc;
  endfunction

  task automatic apply(input logic [31:0] ta, input logic [31:0] tb_, input logic tc);
    logic [32:0] expected;
    a   = ta;
    b   = tb_;
    cin = tc;
    #1;
    expected = 33'(a) + 33'(b) + 33'(cin);
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h + %0b -> %0b_%h, expected %0b_%h",
                 a, b, cin, cout, s, expected[32], expected[31:0]);
    end
    // coverage of the carry-select mechanisms, worked out from the operands
    for (int g = 1; g < NUM_GROUPS; g++) begin
      int          lsb = lsb_of(g);
      int          w   = SIZES[g];
      logic [32:0] low_mask, slice_sum;
      logic        carry_in_g;
      low_mask   = (33'd1 << lsb) - 33'd1;
      carry_in_g = 1'(((33'(a) & low_mask) + (33'(b) & low_mask) + 33'(cin)) >> lsb);
      slice_sum  = ((33'(a) >> lsb) & ((33'd1 << w) - 1)) + ((33'(b) >> lsb) & ((33'd1 << w) - 1));
      if (!carry_in_g) sel0_hits[g]++;
      else begin
        sel1_hits[g]++;
        if (slice_sum == (33'd1 << w) - 1) fal_carry_hits[g]++;
      end
    end
    if (cin && (33'(a) + 33'(b) == 33'hffff_ffff)) full_ripple_hits++;
  endtask

  initial begin
    logic [31:0] ra, rb;
    for (int g = 0; g < NUM_GROUPS; g++) begin
      sel0_hits[g] = 0;
      sel1_hits[g] = 0;
      fal_carry_hits[g] = 0;
    end

    apply(32'hf321eedc, 32'h2213fcbd, 1'b0);
    apply(32'hf321eedc, 32'h2213fcbd, 1'b1);
    apply(32'hffffffff, 32'h2213fcbd, 1'b1);
    apply(32'hffffffff, 32'h00001101, 1'b1);
    apply(32'hffffffff, 32'h00000000, 1'b1);
    apply(32'hffffffff, 32'hffffffff, 1'b1);
    apply(32'h00000000, 32'h00000000, 1'b0);

    for (int n = 0; n < NUM_VECTORS; n++) begin
      ra = $urandom;
      rb = $urandom;
      for (int g = 0; g < NUM_GROUPS; g++) begin
        automatic int lsb = lsb_of(g);
        for (int i = lsb; i < lsb + SIZES[g]; i++) begin
          case (n % 4 == 0 ? 0 : (($urandom >> (2 * g)) & 3))
            1: rb[i] = ~ra[i];                  // propagate
            2: begin ra[i] = 1; rb[i] = 1; end  // generate
            3: begin ra[i] = 0; rb[i] = 0; end  // kill
            default: ;
          endcase
        end
      end
      apply(ra, rb, 1'($urandom));
    end

    for (int g = 1; g < NUM_GROUPS; g++) begin
      $display("group %0d: carry-in-0 result %0d, carry-in-1 result %0d, all-ones carry %0d",
               g + 1, sel0_hits[g], sel1_hits[g], fal_carry_hits[g]);
      if (sel0_hits[g] == 0 || sel1_hits[g] == 0 || fal_carry_hits[g] == 0) begin
        failures++;
        $display("FAIL group %0d: a carry-select path was never taken", g + 1);
      end
    end
    $display("carry rippling from cin to cout: %0d", full_ripple_hits);
    if (full_ripple_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * NUM_VECTORS + 1000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
