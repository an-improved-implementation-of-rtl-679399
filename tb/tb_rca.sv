// tb_rca: self-checking testbench for the ripple carry adder.
//
// The default 4-bit adder is checked exhaustively (all a, b, cin); a 7-bit
// instance is checked with random operands and the all-ones carry chain.
// Expected values are computed with the + operator. One vector per clock;
// a watchdog ends the run with a failure if it hangs.
module tb_rca;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [3:0] a4, b4, s4;
  logic       ci4, co4;
  logic [6:0] a7, b7, s7;
  logic       ci7, co7;

  rca         dut4 (.a(a4), .b(b4), .cin(ci4), .sum(s4), .cout(co4));
  rca #(.W(7)) dut7 (.a(a7), .b(b7), .cin(ci7), .sum(s7), .cout(co7));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check7(input logic [6:0] a, input logic [6:0] b, input logic c);
    a7 = a; b7 = b; ci7 = c;
    @(posedge clk); #1;
    checks++;
    if ({co7, s7} !== 8'(a) + 8'(b) + 8'(c)) begin
      failures++;
      $display("FAIL W=7 %0d + %0d + %0d -> %0d", a, b, c, {co7, s7});
    end
  endtask

  initial begin
    a7 = '0; b7 = '0; ci7 = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = i[8:0];
      @(posedge clk); #1;
      checks++;
      if ({co4, s4} !== 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0d -> %0d", a4, b4, ci4, {co4, s4});
      end
    end
    check7(7'h7f, 7'h00, 1'b1);
    check7(7'h7f, 7'h7f, 1'b1);
    for (int i = 0; i < 500; i++) check7(7'($urandom), 7'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
