// tb_full_adder: exhaustive self-checking testbench for full_adder.
//
// Applies every input combination, one per clock, and compares the output
// with the Boolean expression of the gate written independently here.
// A watchdog ends the run with a failure if it has not finished in time.
module tb_full_adder;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [2:0] v;
  logic sum, cout;
  full_adder dut (.a(v[2]), .b(v[1]), .cin(v[0]), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << 3); i++) begin
      v = i[3-1:0];
      @(posedge clk);
      #1;
      checks++;
      if ({cout, sum} !== (2'(v[2]) + 2'(v[1]) + 2'(v[0]))) begin
        failures++;
        $display("FAIL inputs=%b", v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
