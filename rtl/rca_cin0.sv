// rca_cin0 - WIDTH-bit ripple-carry adder whose carry in is fixed at 0.
//
// The one adder each carry-select group keeps: a half adder at the least
// significant bit (a full adder with carry in 0 reduces to it) followed by
// WIDTH-1 full adders in a ripple chain. Its sum and carry are the group's
// result for carry in 0; the first addition logic derives the carry-in-1
// result from them instead of a second adder.
//
// Interface: a, b (WIDTH bits) in; sum (WIDTH bits), cout out.
// Combinational; WIDTH >= 1. The HA-then-FA structure follows the adder
// description; the WIDTH default of 2 (the second group) is this design's.
module rca_cin0 #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // c[i] is the carry out of bit i.
  logic [WIDTH-1:0] c;

  half_adder u_ha (
    .a    (a[0]),
    .b    (b[0]),
    .sum  (sum[0]),
    .carry(c[0])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i-1]),
      .sum (sum[i]),
      .cout(c[i])
    );
  end

  assign cout = c[WIDTH-1];
endmodule
