// mux2 - WIDTH-bit 2:1 multiplexer.
//
// y = d1 when sel is 1, else d0. In the carry-select adder sel is the carry
// from the next lower group, d0 the result computed for carry in 0 and d1 the
// result for carry in 1; a "6:3" or "12:6" multiplexer is this cell with
// WIDTH 3 or 6. Purely combinational.
//
// The polarity (1 selects the carry-in-1 result) follows the adder
// description; the WIDTH default of 1 is this design's choice.
module mux2 #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] d0,
  input  logic [WIDTH-1:0] d1,
  input  logic             sel,
  output logic [WIDTH-1:0] y
);
  assign y = sel ? d1 : d0;
endmodule
