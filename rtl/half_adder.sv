// half_adder - one-bit half adder.
//
// sum is the exclusive-OR of the two inputs and carry their AND. It is the
// least significant cell of every carry-select group's ripple adder, where the
// group's carry in is taken as 0, and its sum is the bit the first addition
// logic complements. Purely combinational, no clock.
//
// The cell and its truth table follow the adder description; nothing here is
// an own choice.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
