// tb_csla_mp: self-checking testbench for the csla_mp carry select adder.
//
// Three instances: the default 16-bit adder, the 24-bit adder the 16-bit
// multiplier uses, and a 5-bit one that is checked exhaustively. The wide
// ones get directed corner cases (carry rippling through every bit, no
// carries, all ones) and random operands. Expected sums come from the +
// operator. For the 16-bit adder the testbench also counts, from the
// operands alone, how often the carry into each group of the 2, 2, 3, 4,
// 5 bit split (bits 2, 4, 7, 11) is 1 and 0, so that every select path is
// shown to be used. One vector per clock; a watchdog ends the run with a
// failure if it hangs.
module tb_csla_mp;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [15:0] a16, b16, s16;
  logic        ci16, co16;
  logic [23:0] a24, b24, s24;
  logic        ci24, co24;
  logic [4:0]  a5, b5, s5;
  logic        ci5, co5;

  int sel1 [4];
  int sel0 [4];
  localparam int BOUND [4] = '{2, 4, 7, 11};

  csla_mp              dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));
  csla_mp #(.W(24)) dut24 (.a(a24), .b(b24), .cin(ci24), .sum(s24), .cout(co24));
  csla_mp #(.W(5))  dut5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [23:0] a, input logic [23:0] b, input logic c);
    logic [16:0] low;
    a16 = a[15:0]; b16 = b[15:0]; ci16 = c;
    a24 = a;       b24 = b;       ci24 = c;
    @(posedge clk); #1;
    checks++;
    if ({co16, s16} !== 17'(a[15:0]) + 17'(b[15:0]) + 17'(c)) begin
      failures++;
      $display("FAIL W=16 %h + %h + %0d -> %h", a[15:0], b[15:0], c, {co16, s16});
    end
    checks++;
    if ({co24, s24} !== 25'(a) + 25'(b) + 25'(c)) begin
      failures++;
      $display("FAIL W=24 %h + %h + %0d -> %h", a, b, c, {co24, s24});
    end
    for (int k = 0; k < 4; k++) begin
      low = 17'((a[15:0] & ((16'd1 << BOUND[k]) - 16'd1)))
          + 17'((b[15:0] & ((16'd1 << BOUND[k]) - 16'd1))) + 17'(c);
      if (low[BOUND[k]]) sel1[k]++;
      else               sel0[k]++;
    end
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      sel1[k] = 0;
      sel0[k] = 0;
    end
    a5 = '0; b5 = '0; ci5 = 1'b0;
    for (int i = 0; i < 2048; i++) begin
      {ci5, a5, b5} = i[10:0];
      @(posedge clk); #1;
      checks++;
      if ({co5, s5} !== 6'(a5) + 6'(b5) + 6'(ci5)) begin
        failures++;
        $display("FAIL W=5 %0d + %0d + %0d -> %0d", a5, b5, ci5, {co5, s5});
      end
    end
    apply(24'hffffff, 24'h000000, 1'b1);
    apply(24'hffffff, 24'hffffff, 1'b1);
    apply(24'hffffff, 24'hffffff, 1'b0);
    apply(24'h000000, 24'h000000, 1'b0);
    apply(24'h555555, 24'haaaaaa, 1'b1);
    apply(24'h800000, 24'h800000, 1'b0);
    for (int i = 0; i < 20000; i++) apply(24'($urandom), 24'($urandom), 1'($urandom));
    for (int k = 0; k < 4; k++) begin
      $display("group carry at bit %0d: 1 in %0d vectors, 0 in %0d", BOUND[k], sel1[k], sel0[k]);
      checks++;
      if (sel1[k] == 0 || sel0[k] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
