// csa: W-bit 3:2 carry save adder.
//
// One full adder per bit position adds the three input bits of that
// position; its sum goes to the sum row s and its carry to the carry row c,
// which carries one place more weight. No carry moves sideways, so the
// delay is one full adder whatever W is. x + y + z = s + 2*c; purely
// combinational.
module csa #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .sum(s[i]), .cout(c[i]));
  end

endmodule
