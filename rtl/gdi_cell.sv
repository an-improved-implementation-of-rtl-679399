// gdi_cell: logic function of the basic Gate Diffusion Input cell.
//
// The cell is one PMOS and one NMOS transistor sharing the gate input g.
// Unlike a CMOS inverter the outer diffusions are signal inputs: p (PMOS
// side) and n (NMOS side). With g low the PMOS conducts and y follows p;
// with g high the NMOS conducts and y follows n, so y = g ? n : p. Tying
// p, n and g to different signals gives AND, OR, MUX, NOT and the two
// functions F1 = ~g&p and F2 = ~g|n. Only this Boolean behaviour is
// modelled; the reduced swing of a plain GDI output and its restoration are
// electrical effects outside a logic model. Purely combinational.
module gdi_cell (
  input  logic g,
  input  logic p,
  input  logic n,
  output logic y
);

  always_comb y = g ? n : p;

endmodule
