// tb_hier_mult: end-to-end testbench for the 16-bit hierarchy multiplier at
// its default parameters (16 bits, final adder of the half-sum / two carry
// generator form).
//
// Directed operands (zero, one, all ones, single halves, powers of two)
// are followed by random ones; every product is compared with x * y. From
// the operands alone the testbench also rebuilds the four half products,
// the carry save rows and the final adder inputs, and counts how often
// each mechanism of the architecture is exercised:
//   csa_full   a carry save column whose three bits are all 1
//   csa_top    a carry out of the top carry save column (into bit 3H)
//   band_carry a carry of the final adder from the middle band into the
//              band that holds only the high half of xh*yh
//   top_band   a nonzero high half of xh*yh
// Each must happen at least once. The multiplier is combinational, so the
// product is checked in the same clock as the operands are applied (zero
// cycles of latency). A watchdog ends the run with a failure if it hangs.
module tb_hier_mult;

  localparam int N = 16;
  localparam int H = N / 2;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   csa_full = 0, csa_top = 0, band_carry = 0, top_band = 0;

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p;

  hier_mult dut (.x(x), .y(y), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xi, input logic [N-1:0] yi);
    logic [N-1:0] hh, hl, lh, ll, r0, cs, cc;
    logic [N:0]   low;
    x = xi; y = yi;
    @(posedge clk); #1;
    checks++;
    if (p !== (2*N)'(xi) * (2*N)'(yi)) begin
      failures++;
      if (failures < 20) $display("FAIL %h * %h -> %h", xi, yi, p);
    end
    hh = N'(xi[N-1:H]) * N'(yi[N-1:H]);
    hl = N'(xi[N-1:H]) * N'(yi[H-1:0]);
    lh = N'(xi[H-1:0]) * N'(yi[N-1:H]);
    ll = N'(xi[H-1:0]) * N'(yi[H-1:0]);
    r0 = {hh[H-1:0], ll[N-1:H]};
    cs = r0 ^ hl ^ lh;
    cc = (r0 & hl) | (r0 & lh) | (hl & lh);
    if ((r0 & hl & lh) != '0) csa_full++;
    if (cc[N-1]) csa_top++;
    low = (N+1)'(cs) + (N+1)'({cc[N-2:0], 1'b0});
    if (low[N]) band_carry++;
    if (hh[N-1:H] != '0) top_band++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, '1);
    apply('1, 16'd1);
    apply(16'd1, '1);
    apply(16'hff00, 16'h00ff);
    apply(16'h00ff, 16'hff00);
    apply(16'hffff, 16'h00ff);
    apply(16'h8000, 16'h8000);
    for (int i = 0; i < N; i++) apply(16'd1 << i, 16'hffff);
    for (int i = 0; i < 200000; i++) apply(16'($urandom), 16'($urandom));
    $display("mechanisms: csa_full=%0d csa_top=%0d band_carry=%0d top_band=%0d",
             csa_full, csa_top, band_carry, top_band);
    checks += 4;
    if (csa_full == 0)   failures++;
    if (csa_top == 0)    failures++;
    if (band_carry == 0) failures++;
    if (top_band == 0)   failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
