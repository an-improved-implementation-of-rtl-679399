// tb_bec: exhaustive self-checking testbench for the binary to excess-1
// converter.
//
// The default 4-bit converter and a 6-bit one (the widest used by a 16-bit
// BEC carry select adder) get every input; the expected output is x + 1
// with the carry out of the top bit dropped. One vector per clock; a
// watchdog ends the run with a failure if it hangs.
module tb_bec;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [3:0] x4, y4;
  logic [5:0] x6, y6;

  bec          dut4 (.x(x4), .y(y4));
  bec #(.W(6)) dut6 (.x(x6), .y(y6));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      x4 = i[3:0];
      x6 = i[5:0];
      @(posedge clk); #1;
      if (i < 16) begin
        checks++;
        if (y4 !== 4'(i + 1)) begin
          failures++;
          $display("FAIL W=4 x=%0d y=%0d", x4, y4);
        end
      end
      checks++;
      if (y6 !== 6'(i + 1)) begin
        failures++;
        $display("FAIL W=6 x=%0d y=%0d", x6, y6);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
