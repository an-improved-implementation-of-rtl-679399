// gdi_xor: full-swing GDI XOR gate.
//
// The first stage is a GDI cell whose gate is a and whose diffusions carry
// b (PMOS side) and ~b (NMOS side): with a = 0 the output is b, with a = 1
// it is ~b, i.e. a ^ b. The published gate adds two transistors driven by b
// and ~b that pass a to the output to restore a full logic level; they
// drive the same logic value and are not modelled separately. Purely
// combinational.
module gdi_xor (
  input  logic a,
  input  logic b,
  output logic y
);

  logic b_n;

  always_comb b_n = ~b;

  gdi_cell u_cell (.g(a), .p(b), .n(b_n), .y(y));

endmodule
