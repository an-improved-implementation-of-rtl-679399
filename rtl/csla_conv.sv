// csla_conv: conventional W-bit carry select adder.
//
// The operands are cut into groups (sizes from mult_pkg: 2, 2, 3, 4, 5, ...
// bits, least significant first). The first group is a single ripple
// adder fed by the real carry in. Every other group holds two ripple adders
// that work at the same time, one assuming a group carry in of 0 and one
// of 1; when the carry out of the group below arrives, a row of
// multiplexers picks the sums and the carry out of the matching adder. The
// carry thus passes each upper group through one multiplexer instead of a
// ripple chain. The group sizes are this design's choice (the structure
// leaves them open). {cout, sum} = a + b + cin; purely combinational.
module csla_conv
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
      logic [GW-1:0] s0, s1;
      logic          c0, c1;

      rca #(.W(GW)) u_rca0 (
        .a(a[LSB +: GW]), .b(b[LSB +: GW]), .cin(1'b0), .sum(s0), .cout(c0)
      );
      rca #(.W(GW)) u_rca1 (
        .a(a[LSB +: GW]), .b(b[LSB +: GW]), .cin(1'b1), .sum(s1), .cout(c1)
      );

      for (genvar i = 0; i < GW; i++) begin : g_mux
        gdi_mux u_mux (.s(gc[k]), .d0(s0[i]), .d1(s1[i]), .y(sum[LSB+i]));
      end
      gdi_mux u_cmux (.s(gc[k]), .d0(c0), .d1(c1), .y(gc[k+1]));
    end
  end

  assign cout = gc[NG];

endmodule
