// csla_bec: W-bit carry select adder with binary to excess-1 converters.
//
// Same grouping as csla_conv (2, 2, 3, 4, 5 bits for 16 bits, least
// significant first). The first group is a ripple adder fed by the real
// carry in. Each upper group of k bits has one ripple adder with carry in
// 0; a (k+1)-bit converter adds one to its {carry, sum} to form the result
// for carry in 1, and a row of multiplexers picks one of the two (k+1)-bit
// results with the carry out of the group below. This saves the second
// ripple adder of the conventional form. {cout, sum} = a + b + cin; purely
// combinational. Widths above 16 continue with 6, 7, ... bit groups, which
// is this design's choice.
module csla_bec
  import mult_pkg::*;
#(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  localparam int NG = num_groups(W);

  logic [NG:0] gc;  // gc[k]: carry into group k

  assign gc[0] = cin;

  for (genvar k = 0; k < NG; k++) begin : g_grp
    localparam int LSB = grp_lsb(k);
    localparam int GW  = grp_width(W, k);

    if (k == 0) begin : g_first
      rca #(.W(GW)) u_rca (
        .a(a[LSB +: GW]), .b(b[LSB +: GW]), .cin(gc[0]),
        .sum(sum[LSB +: GW]), .cout(gc[1])
      );
    end else begin : g_sel
      logic [GW:0] r0;  // {carry, sum} for group carry in 0
      logic [GW:0] r1;  // r0 + 1: {carry, sum} for group carry in 1
      logic [GW:0] r;

      rca #(.W(GW)) u_rca (
        .a(a[LSB +: GW]), .b(b[LSB +: GW]), .cin(1'b0),
        .sum(r0[GW-1:0]), .cout(r0[GW])
      );
      bec #(.W(GW + 1)) u_bec (.x(r0), .y(r1));

      for (genvar i = 0; i <= GW; i++) begin : g_mux
        gdi_mux u_mux (.s(gc[k]), .d0(r0[i]), .d1(r1[i]), .y(r[i]));
      end

      assign sum[LSB +: GW] = r[GW-1:0];
      assign gc[k+1]        = r[GW];
    end
  end

  assign cout = gc[NG];

endmodule
