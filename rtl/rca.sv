// rca: W-bit ripple carry adder.
//
// A chain of W full adders; the carry of bit i is the carry in of bit i+1,
// so the delay grows linearly with W. {cout, sum} = a + b + cin. Used as
// the group adder of the carry select adders and as the row adder of the
// array multiplier. Purely combinational.
module rca #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1]));
  end

  assign cout = c[W];

endmodule
