// csla_mp: W-bit carry select adder with shared half sums and two carry
// generators (area-delay-power efficient form).
//
// Four units, computed in order:
//   HSG  half-sum generation: s0 = a ^ b and c0 = a & b for every bit.
//   CG0  carry generator for carry in 0: k0[i] = c0[i] | s0[i] & k0[i-1],
//        k0[-1] = 0.
//   CG1  carry generator for carry in 1: the same chain with k1[-1] = 1.
//   CS   carry selection: each carry is taken from CG1 when cin is 1 and
//        from CG0 otherwise; cout is the selected carry of the top bit.
//   FSG  final sum generation: sum[0] = s0[0] ^ cin, sum[i] = s0[i] ^ k[i-1].
// Unlike the other carry select adders no sum bits are computed twice:
// only carries are, and the adder is not split into groups. The unit
// names and their connections follow the published block diagram; the
// equations inside the units are the standard ones for this adder and are
// this design's reading. {cout, sum} = a + b + cin; purely combinational.
// W must be at least 2.
module csla_mp #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W-1:0] s0, c0;   // HSG outputs
  logic [W-1:0] k0, k1;   // CG0 and CG1 carries
  logic [W-1:0] k;        // CS output
  logic [W-1:0] kin;      // carry into each bit for FSG

  // HSG
  for (genvar i = 0; i < W; i++) begin : g_hsg
    gdi_xor u_x (.a(a[i]), .b(b[i]), .y(s0[i]));
    gdi_and u_a (.a(a[i]), .b(b[i]), .y(c0[i]));
  end

  // CG0 and CG1
  assign k0[0] = c0[0];
  assign k1[0] = c0[0] | s0[0];

  for (genvar i = 1; i < W; i++) begin : g_cg
    assign k0[i] = c0[i] | (s0[i] & k0[i-1]);
    assign k1[i] = c0[i] | (s0[i] & k1[i-1]);
  end

  // CS
  for (genvar i = 0; i < W; i++) begin : g_cs
    gdi_mux u_m (.s(cin), .d0(k0[i]), .d1(k1[i]), .y(k[i]));
  end

  // FSG
  assign kin = {k[W-2:0], cin};

  for (genvar i = 0; i < W; i++) begin : g_fsg
    gdi_xor u_x (.a(s0[i]), .b(kin[i]), .y(sum[i]));
  end

  assign cout = k[W-1];

endmodule
