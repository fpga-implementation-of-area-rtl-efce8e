// fal - first addition logic: turns a group's carry-in-0 result into its
// carry-in-1 result without a second adder.
//
// Adding one to a binary number complements its lowest bit, and complements
// every higher bit whose lower bits are all ones. So:
//   sum1[0]  = ~sum0[0]
//   sum1[i]  = and_bit[i] ? ~sum0[i] : sum0[i],  and_bit[i] = &sum0[i-1:0]
//   cout1    = and_bit[WIDTH] ? ~cout0 : cout0
// and_bit is built as a chain of two-input AND gates, one per bit, and each
// output bit is a 2:1 choice between the bit and its inverse. The carry is
// handled the same way: it changes only when every sum bit is one, and then
// cout0 is necessarily 0 (two WIDTH-bit numbers cannot add to 2^(WIDTH+1)-1),
// so the toggle equals cout0 | (&sum0).
//
// Interface: sum0 (WIDTH bits) and cout0 in; sum1 (WIDTH bits) and cout1 out.
// Combinational; the critical path is the AND chain, WIDTH gates long.
// The complement-of-the-LSB rule, the AND chain selecting bit or complement
// and the all-ones carry rule follow the adder description; expressing the
// carry as a toggle of cout0 is this design's reading of its gate diagram.
module fal #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] sum0,
  input  logic             cout0,
  output logic [WIDTH-1:0] sum1,
  output logic             cout1
);
  // and_bit[i] = 1 when sum0[i-1:0] are all ones; and_bit[0] = 1 (the +1).
  logic [WIDTH:0] and_bit;

  assign and_bit[0] = 1'b1;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    if (i == 0) begin : g_lsb
      assign and_bit[1] = sum0[0];
    end else begin : g_and
      assign and_bit[i+1] = and_bit[i] & sum0[i];
    end
    mux2 #(.WIDTH(1)) u_sel (
      .d0 (sum0[i]),
      .d1 (~sum0[i]),
      .sel(and_bit[i]),
      .y  (sum1[i])
    );
  end

  mux2 #(.WIDTH(1)) u_csel (
    .d0 (cout0),
    .d1 (~cout0),
    .sel(and_bit[WIDTH]),
    .y  (cout1)
  );
endmodule
