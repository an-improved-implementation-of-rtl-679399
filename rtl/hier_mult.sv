// hier_mult: N-bit unsigned hierarchy multiplier, p = x * y.
//
// The operands are split into halves of H = N/2 bits, x = {xh, xl} and
// y = {yh, yl}. Four H x H array multipliers form xh*yh, xh*yl, xl*yh and
// xl*yl at the same time. Their 2H-bit products overlap:
//   p = xl*yl + (xh*yl + xl*yh) << H + xh*yh << 2H.
// Product bits [H-1:0] are the low half of xl*yl and need no addition.
// Bits [3H-1:H] receive three rows: {xh*yh low half, xl*yl high half},
// xh*yl and xl*yh; an N-bit carry save adder reduces them to a sum row and
// a carry row. A 3H-bit carry select adder then adds the sum row, the
// carry row (one place up) and the high half of xh*yh, which stands alone
// in bits [2N-1:3H], and gives product bits [2N-1:H]. Its carry out is
// always 0, since the product fits in 2N bits, and is left unused.
//
// ADDER chooses which carry select adder does the final addition: the
// dual-RCA form, the BEC form or the half-sum / two-carry-generator form
// (default). The split into four base multipliers, the carry save adder
// and the carry select adder follow the published architecture; the
// column ranges of the two adders and the default adder are this design's
// reading of it. There are no registers: the whole multiplication is one
// combinational path, meant to complete within one clock cycle of the
// surrounding logic. N must be even and at least 4.
module hier_mult
  import mult_pkg::*;
#(
  parameter int unsigned N     = 16,
  parameter adder_kind_e ADDER = CSLA_MP
) (
  input  logic [N-1:0]   x,
  input  logic [N-1:0]   y,
  output logic [2*N-1:0] p
);

  localparam int unsigned H  = N / 2;
  localparam int unsigned FW = 3 * H;   // final adder width

  logic [N-1:0]  p_hh, p_hl, p_lh, p_ll; // base products
  logic [N-1:0]  cs_s, cs_c;             // carry save rows
  logic [FW-1:0] fa_a, fa_b, fa_sum;
  logic          fa_cout;

  // Base multipliers
  array_mult #(.W(H)) u_hh (.a(x[N-1:H]), .b(y[N-1:H]), .p(p_hh));
  array_mult #(.W(H)) u_hl (.a(x[N-1:H]), .b(y[H-1:0]), .p(p_hl));
  array_mult #(.W(H)) u_lh (.a(x[H-1:0]), .b(y[N-1:H]), .p(p_lh));
  array_mult #(.W(H)) u_ll (.a(x[H-1:0]), .b(y[H-1:0]), .p(p_ll));

  // Carry save adder over product bits [3H-1:H]
  csa #(.W(N)) u_csa (
    .x({p_hh[H-1:0], p_ll[N-1:H]}),
    .y(p_hl),
    .z(p_lh),
    .s(cs_s),
    .c(cs_c)
  );

  // Final carry select adder over product bits [2N-1:H]
  assign fa_a = {p_hh[N-1:H], cs_s};
  assign fa_b = {{(H-1){1'b0}}, cs_c, 1'b0};

  if (ADDER == CSLA_CONV) begin : g_conv
    csla_conv #(.W(FW)) u_add (.a(fa_a), .b(fa_b), .cin(1'b0), .sum(fa_sum), .cout(fa_cout));
  end else if (ADDER == CSLA_BEC) begin : g_bec
    csla_bec  #(.W(FW)) u_add (.a(fa_a), .b(fa_b), .cin(1'b0), .sum(fa_sum), .cout(fa_cout));
  end else begin : g_mp
    csla_mp   #(.W(FW)) u_add (.a(fa_a), .b(fa_b), .cin(1'b0), .sum(fa_sum), .cout(fa_cout));
  end

  assign p = {fa_sum, p_ll[H-1:0]};

endmodule
