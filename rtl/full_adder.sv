// full_adder: one-bit full adder in the full-swing GDI style.
//
// Three stages, as in the published transistor diagram: an XOR stage makes
// x = a ^ b; a multiplexer stage selected by x gives sum = x ? ~cin : cin;
// a second multiplexer stage selected by x gives cout = x ? cin : a (when
// a and b differ the carry is cin, otherwise it is their common value a).
// Which diffusion takes which input in the carry stage is this design's
// reading, fixed by requiring correct addition. Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic x;
  logic cin_n;

  always_comb cin_n = ~cin;

  gdi_xor u_xor   (.a(a), .b(b), .y(x));
  gdi_mux u_sum   (.s(x), .d0(cin), .d1(cin_n), .y(sum));
  gdi_mux u_carry (.s(x), .d0(a),   .d1(cin),   .y(cout));

endmodule
