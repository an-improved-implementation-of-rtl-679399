// tb_hier_mult_variants: the hierarchy multiplier with each choice of
// final carry select adder.
//
// Two 16-bit multipliers use the dual-RCA and the BEC carry select adders
// and get directed and random operands; an 8-bit multiplier with the
// default adder is checked exhaustively. Products are compared with x * y.
// For the 16-bit ones the testbench rebuilds the final adder inputs from
// the operands and counts, at each group boundary of the 24-bit adder
// (bits 2, 4, 7, 11, 16, 22), how often the group carry is 1 and 0, so
// that both inputs of every select multiplexer are shown to be used. A
// watchdog ends the run with a failure if it hangs.
module tb_hier_mult_variants;
  import mult_pkg::*;

  localparam int N = 16;
  localparam int H = N / 2;
  localparam int NB = 6;
  localparam int BOUND [NB] = '{2, 4, 7, 11, 16, 22};

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  int   sel1 [NB];
  int   sel0 [NB];

  logic [N-1:0]   x, y;
  logic [2*N-1:0] p_conv, p_bec;
  logic [7:0]     x8, y8;
  logic [15:0]    p8;

  hier_mult #(.ADDER(CSLA_CONV)) dut_conv (.x(x), .y(y), .p(p_conv));
  hier_mult #(.ADDER(CSLA_BEC))  dut_bec  (.x(x), .y(y), .p(p_bec));
  hier_mult #(.N(8))             dut8     (.x(x8), .y(y8), .p(p8));

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [N-1:0] xi, input logic [N-1:0] yi);
    logic [N-1:0]   hh, hl, lh, ll, r0, cs, cc;
    logic [3*H-1:0] fa, fb;
    logic [3*H:0]   part;
    logic [3*H-1:0] mask;
    x = xi; y = yi;
    @(posedge clk); #1;
    checks += 2;
    if (p_conv !== (2*N)'(xi) * (2*N)'(yi)) begin
      failures++;
      if (failures < 20) $display("FAIL conv %h * %h -> %h", xi, yi, p_conv);
    end
    if (p_bec !== (2*N)'(xi) * (2*N)'(yi)) begin
      failures++;
      if (failures < 20) $display("FAIL bec %h * %h -> %h", xi, yi, p_bec);
    end
    hh = N'(xi[N-1:H]) * N'(yi[N-1:H]);
    hl = N'(xi[N-1:H]) * N'(yi[H-1:0]);
    lh = N'(xi[H-1:0]) * N'(yi[N-1:H]);
    ll = N'(xi[H-1:0]) * N'(yi[H-1:0]);
    r0 = {hh[H-1:0], ll[N-1:H]};
    cs = r0 ^ hl ^ lh;
    cc = (r0 & hl) | (r0 & lh) | (hl & lh);
    fa = {hh[N-1:H], cs};
    fb = (3*H)'({cc, 1'b0});
    for (int k = 0; k < NB; k++) begin
      mask = ((3*H)'(1) << BOUND[k]) - 1;
      part = (3*H+1)'(fa & mask) + (3*H+1)'(fb & mask);
      if (part[BOUND[k]]) sel1[k]++;
      else                sel0[k]++;
    end
  endtask

  initial begin
    for (int k = 0; k < NB; k++) begin
      sel1[k] = 0;
      sel0[k] = 0;
    end
    x8 = '0; y8 = '0;
    apply('0, '0);
    apply('1, '1);
    apply(16'hff00, 16'h00ff);
    apply(16'h8000, 16'hffff);
    for (int i = 0; i < 60000; i++) apply(16'($urandom), 16'($urandom));
    for (int i = 0; i < 65536; i++) begin
      {x8, y8} = i[15:0];
      @(posedge clk); #1;
      checks++;
      if (p8 !== 16'(x8) * 16'(y8)) begin
        failures++;
        if (failures < 20) $display("FAIL N=8 %0d * %0d -> %0d", x8, y8, p8);
      end
    end
    for (int k = 0; k < NB; k++) begin
      $display("group carry at bit %0d: 1 in %0d vectors, 0 in %0d", BOUND[k], sel1[k], sel0[k]);
      checks++;
      if (sel1[k] == 0 || sel0[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
