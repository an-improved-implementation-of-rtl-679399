// array_mult: unsigned W x W array multiplier (the base multiplier).
//
// W*W two-input AND gates form the partial products pp[j] = a & {W{b[j]}}.
// Row 0 gives product bit 0 directly; its upper W-1 bits, with a 0 on top,
// form the running row. For each further multiplier bit b[j] a W-bit
// ripple adder (carry in 0) adds pp[j] to the running row: the low sum bit
// is product bit j, and the remaining sum bits with the adder's carry out
// on top become the next running row. After the last adder the running
// row is the upper half of the product. This takes W-1 adders of W full
// adders, (W-1)*W full adders in all. p = a * b; purely combinational.
module array_mult #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  logic [W-1:0] pp  [W];   // partial product rows
  logic [W-1:0] row [W];   // running row entering adder j (index j)
  logic [W-1:0] s   [W];   // adder sums
  logic [W-1:0] co;        // adder carries

  for (genvar j = 0; j < W; j++) begin : g_row
    for (genvar i = 0; i < W; i++) begin : g_and
      gdi_and u_and (.a(a[i]), .b(b[j]), .y(pp[j][i]));
    end
  end

  assign p[0]   = pp[0][0];
  assign row[1] = {1'b0, pp[0][W-1:1]};
  assign row[0] = '0;
  assign s[0]   = pp[0];
  assign co[0]  = 1'b0;

  for (genvar j = 1; j < W; j++) begin : g_add
    rca #(.W(W)) u_add (
      .a(pp[j]), .b(row[j]), .cin(1'b0), .sum(s[j]), .cout(co[j])
    );
    assign p[j] = s[j][0];
    if (j < W - 1) begin : g_next
      assign row[j+1] = {co[j], s[j][W-1:1]};
    end
  end

  assign p[2*W-1:W] = {co[W-1], s[W-1][W-1:1]};

endmodule
