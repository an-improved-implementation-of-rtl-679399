// tb_gdi_and: exhaustive self-checking testbench for gdi_and.
//
// Applies every input combination, one per clock, and compares the output
// with the Boolean expression of the gate written independently here.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_gdi_and;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [1:0] v;
  logic y;
  gdi_and dut (.a(v[1]), .b(v[0]), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 2); i++) begin
      v = i[2-1:0];
      @(posedge clk);
      #1;
      checks++;
      if (y !== (v == 2'b11)) begin
        failures++;
        $display("FAIL inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
