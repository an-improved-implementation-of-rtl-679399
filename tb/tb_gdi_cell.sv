// tb_gdi_cell: exhaustive self-checking testbench for gdi_cell.
//
// One cell gets all eight (g, p, n) combinations and is compared with
// y = g ? n : p. Six more cells are wired as the standard GDI functions
// (A on the gate, B and C on the diffusions or constants) and are checked
// against their Boolean expressions for all A, B, C:
//   F1  n=0, p=B      ~A & B        F2  n=B, p=1      ~A | B
//   OR  n=1, p=B       A | B        AND n=B, p=0       A & B
//   MUX n=C, p=B      ~A&B | A&C    NOT n=0, p=1      ~A
// One combination per clock; a watchdog ends the run with a failure if it
// hangs.
module tb_gdi_cell;

  logic clk = 1'b0;
  int   checks = 0;
  int   failures = 0;
  logic [2:0] v;
  logic y, y_f1, y_f2, y_or, y_and, y_mux, y_not;
  logic fa, fb, fc;

  gdi_cell dut    (.g(v[2]), .p(v[1]), .n(v[0]), .y(y));
  gdi_cell u_f1   (.g(fa), .p(fb),   .n(1'b0), .y(y_f1));
  gdi_cell u_f2   (.g(fa), .p(1'b1), .n(fb),   .y(y_f2));
  gdi_cell u_or   (.g(fa), .p(fb),   .n(1'b1), .y(y_or));
  gdi_cell u_and  (.g(fa), .p(1'b0), .n(fb),   .y(y_and));
  gdi_cell u_mux  (.g(fa), .p(fb),   .n(fc),   .y(y_mux));
  gdi_cell u_not  (.g(fa), .p(1'b1), .n(1'b0), .y(y_not));

  assign {fa, fb, fc} = v;

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_bit(input string what, input logic got, input logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s inputs=%b got=%b expected=%b", what, v, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 8; i++) begin
      v = i[2:0];
      @(posedge clk);
      #1;
      expect_bit("cell", y,     (v[2] & v[0]) | (~v[2] & v[1]));
      expect_bit("F1",   y_f1,  ~fa & fb);
      expect_bit("F2",   y_f2,  ~fa | fb);
      expect_bit("OR",   y_or,  fa | fb);
      expect_bit("AND",  y_and, fa & fb);
      expect_bit("MUX",  y_mux, (~fa & fb) | (fa & fc));
      expect_bit("NOT",  y_not, ~fa);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
