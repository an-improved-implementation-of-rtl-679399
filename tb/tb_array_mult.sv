// tb_array_mult: exhaustive self-checking testbench for the array
// multiplier.
//
// The default 8 x 8 multiplier (the base multiplier of the 16-bit
// hierarchy multiplier) and a 4 x 4 one are given every operand pair; the
// expected product comes from the * operator. One pair per clock; a
// watchdog ends the run with a failure if it hangs.
module tb_array_mult;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;

  array_mult          dut8 (.a(a8), .b(b8), .p(p8));
  array_mult #(.W(4)) dut4 (.a(a4), .b(b4), .p(p4));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = i[15:0];
      {a4, b4} = i[7:0];
      @(posedge clk); #1;
      checks++;
      if (p8 !== 16'(a8) * 16'(b8)) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 %0d * %0d -> %0d", a8, b8, p8);
      end
      if (i < 256) begin
        checks++;
        if (p4 !== 8'(a4) * 8'(b4)) begin
          failures++;
          $display("FAIL W=4 %0d * %0d -> %0d", a4, b4, p4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
