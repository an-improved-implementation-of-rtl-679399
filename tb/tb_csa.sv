// tb_csa: self-checking testbench for the 3:2 carry save adder.
//
// The default 16-bit adder gets directed rows (all zero, all one, single
// columns) and random rows. Each output bit is checked against the
// full-adder equations of its column (sum = parity, carry = majority), and
// the identity x + y + z = s + 2c is checked on whole rows. One vector per
// clock; a watchdog ends the run with a failure if it hangs.
module tb_csa;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;

  logic [15:0] x, y, z, s, c;

  csa dut (.x(x), .y(y), .z(z), .s(s), .c(c));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] xi, input logic [15:0] yi, input logic [15:0] zi);
    x = xi; y = yi; z = zi;
    @(posedge clk); #1;
    checks++;
    if (s !== (xi ^ yi ^ zi) || c !== ((xi & yi) | (xi & zi) | (yi & zi))) begin
      failures++;
      $display("FAIL %h %h %h -> s=%h c=%h", xi, yi, zi, s, c);
    end
    checks++;
    if (18'(xi) + 18'(yi) + 18'(zi) !== 18'(s) + (18'(c) << 1)) begin
      failures++;
      $display("FAIL row sum %h %h %h", xi, yi, zi);
    end
  endtask

  initial begin
    apply('0, '0, '0);
    apply('1, '1, '1);
    apply('1, '0, '0);
    apply('0, '1, '1);
    for (int i = 0; i < 16; i++) apply(16'd1 << i, 16'd1 << i, 16'd0);
    for (int i = 0; i < 5000; i++) apply(16'($urandom), 16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
