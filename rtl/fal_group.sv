// fal_group - one carry-select stage of the adder, using first addition logic.
//
// The stage adds its WIDTH-bit operand slices once, with carry in 0, in a
// ripple adder (rca_cin0). The first addition logic (fal) derives from that
// result the sum and carry the stage would give with carry in 1. A
// (WIDTH+1)-bit 2:1 multiplexer then picks one of the two results with the
// carry from the next lower stage, which arrives last: the stage's own
// addition runs in parallel with the lower stages.
//
// Interface: a, b (WIDTH bits), cin (the lower stage's carry, used only as
// the multiplexer select) in; sum (WIDTH bits), cout out. Combinational.
// The structure follows the adder description; the WIDTH default of 2 (the
// second group) is this design's.
module fal_group #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH-1:0] sum0, sum1;
  logic             cout0, cout1;

  rca_cin0 #(.WIDTH(WIDTH)) u_rca (
    .a   (a),
    .b   (b),
    .sum (sum0),
    .cout(cout0)
  );

  fal #(.WIDTH(WIDTH)) u_fal (
    .sum0 (sum0),
    .cout0(cout0),
    .sum1 (sum1),
    .cout1(cout1)
  );

  mux2 #(.WIDTH(WIDTH + 1)) u_mux (
    .d0 ({cout0, sum0}),
    .d1 ({cout1, sum1}),
    .sel(cin),
    .y  ({cout, sum})
  );
endmodule
