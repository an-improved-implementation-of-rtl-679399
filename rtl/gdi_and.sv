// gdi_and: two-input AND built from one GDI cell (n = b, p = 0, g = a).
//
// With a = 0 the PMOS passes the constant 0; with a = 1 the NMOS passes b.
// The full-swing version adds a restoring transistor for the weak 0 passed
// by the PMOS, which does not change the logic. Used for every partial
// product of the array multipliers. Purely combinational.
module gdi_and (
  input  logic a,
  input  logic b,
  output logic y
);

  gdi_cell u_cell (.g(a), .p(1'b0), .n(b), .y(y));

endmodule
