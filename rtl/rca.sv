// rca - WIDTH-bit ripple-carry adder with a carry input.
//
// A chain of full adders: bit i adds a[i], b[i] and the carry of bit i-1, the
// first bit takes cin. It forms the lowest group of the square-root
// carry-select adder (two bits wide there), whose carry in is known when the
// addition starts, so it needs no duplicate and no selection. Its cout drives
// the select of the next group's multiplexer.
//
// Interface: a, b (WIDTH bits), cin in; sum (WIDTH bits), cout out.
// Combinational; the carry ripples through WIDTH full adders.
// The structure follows the adder description; WIDTH defaults to that group's
// 2 bits.
module rca #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  // c[i] is the carry into bit i; c[WIDTH] the carry out.
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
