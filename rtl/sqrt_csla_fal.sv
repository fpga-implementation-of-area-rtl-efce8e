// sqrt_csla_fal - variable-sized (square-root) carry-select adder with first
// addition logic, 32 bits by default.
//
// The operands are cut into NUM_GROUPS slices of growing width, 2-2-3-4-6-7-8
// bits from the LSB. Group 1 is a plain ripple-carry adder fed by cin. Every
// higher group (fal_group) adds its slice once for carry in 0, derives the
// carry-in-1 result with first addition logic, and lets the carry of the group
// below select between the two. The groups' additions all run at once; only
// the select carry ripples from group to group, one 2:1 multiplexer per group,
// and the growing widths let each group's own addition finish about when its
// select carry arrives.
//
// Interface: a, b (WIDTH bits) and cin in; s (WIDTH bits) and cout out.
// Purely combinational: no clock, no reset, a result after the
// propagation delay.
//
// The group count, the group widths and the group structure follow the
// adder description. Parameterizing the group widths, so that other word
// sizes can be built, is this design's own; WIDTH must equal the sum of
// GROUP_SIZES and every group must be at least one bit wide. GROUP_SIZES is a
// packed list of 8-bit widths, written most significant group first.
module sqrt_csla_fal #(
  parameter int unsigned              NUM_GROUPS  = 7,
  // width of each group, group 1 (the least significant) in element 0
  parameter bit [NUM_GROUPS-1:0][7:0] GROUP_SIZES = {8'd8, 8'd7, 8'd6, 8'd4, 8'd3, 8'd2, 8'd2},
  parameter int unsigned              WIDTH       = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  // Bit position of the LSB of group g (0-based); group_lsb(NUM_GROUPS) is the
  // total width.
  function automatic int unsigned group_lsb(int unsigned g);
    int unsigned acc = 0;
    for (int unsigned i = 0; i < g; i++) acc += 32'(GROUP_SIZES[i]);
    return acc;
  endfunction

  if (group_lsb(NUM_GROUPS) != WIDTH) begin : g_bad_sizes
    $error("sqrt_csla_fal: GROUP_SIZES add up to %0d bits, WIDTH is %0d",
           group_lsb(NUM_GROUPS), WIDTH);
  end

  localparam int unsigned W1 = 32'(GROUP_SIZES[0]);

  // gc[g] is the carry out of group g; gc[NUM_GROUPS-1] is the adder's cout.
  logic [NUM_GROUPS-1:0] gc;

  rca #(.WIDTH(W1)) u_group1 (
    .a   (a[W1-1:0]),
    .b   (b[W1-1:0]),
    .cin (cin),
    .sum (s[W1-1:0]),
    .cout(gc[0])
  );

  for (genvar g = 1; g < NUM_GROUPS; g++) begin : g_group
    localparam int unsigned LSB = group_lsb(g);
    localparam int unsigned W   = 32'(GROUP_SIZES[g]);

    fal_group #(.WIDTH(W)) u_group (
      .a   (a[LSB +: W]),
      .b   (b[LSB +: W]),
      .cin (gc[g-1]),
      .sum (s[LSB +: W]),
      .cout(gc[g])
    );
  end

  assign cout = gc[NUM_GROUPS-1];
endmodule
