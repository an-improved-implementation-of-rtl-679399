// gdi_mux: 2:1 multiplexer built from one GDI cell (g = s, p = d0, n = d1).
//
// y = s ? d1 : d0. This is the multiplexer of the carry select adders and
// of the sum and carry stages of the full adder. Purely combinational.
module gdi_mux (
  input  logic s,
  input  logic d0,
  input  logic d1,
  output logic y
);

  gdi_cell u_cell (.g(s), .p(d0), .n(d1), .y(y));

endmodule
