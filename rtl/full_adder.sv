// full_adder - one-bit full adder.
//
// Built as the usual pair of half-adder stages: p = a ^ b, sum = p ^ cin and
// cout = (a & b) | (p & cin), which is the XOR/AND/OR arrangement of the
// AND-OR-inverter gate model used to count area and delay. Purely
// combinational.
//
// Interface: a, b, cin in; sum, cout out. The function is the standard one;
// writing it through the propagate signal p is this design's choice.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic p;

  assign p    = a ^ b;
  assign sum  = p ^ cin;
  assign cout = (a & b) | (p & cin);
endmodule
