// bec: W-bit binary to excess-1 converter, y = x + 1 modulo 2^W.
//
// In the BEC carry select adder it replaces the second (carry-in = 1)
// ripple adder of a group: the group's carry-in-0 result {carry, sum} is
// incremented instead of recomputed. Bit 0 is inverted and bit i is
// inverted when all lower bits are 1, which is the increment written as
// XOR and AND gates. Purely combinational.
module bec #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);

  logic [W-1:0] all_ones;  // all_ones[i]: x[i-1:0] are all 1

  assign all_ones[0] = 1'b1;

  for (genvar i = 1; i < W; i++) begin : g_chain
    assign all_ones[i] = all_ones[i-1] & x[i-1];
  end

  assign y = x ^ all_ones;

endmodule
