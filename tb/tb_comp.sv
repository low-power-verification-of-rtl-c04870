// tb_comp: exhaustive self-check of the comparator at the design's width (1)
// and at width 4. Expected flags come from integer comparison; exactly one
// flag must be set for every pair.
module tb_comp;
  logic       a1, b1, l1, e1, g1;
  logic [3:0] a4, b4;
  logic       l4, e4, g4;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  comp dut1 (.a(a1), .b(b1), .l(l1), .e(e1), .g(g1));
  comp #(.WIDTH(4)) dut4 (.a(a4), .b(b4), .l(l4), .e(e4), .g(g4));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("tb_comp: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string tag, int x, int y, logic l, logic e, logic g);
    checks++;
    if ({l, e, g} != {x < y, x == y, x > y}) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d -> L=%0b E=%0b G=%0b", tag, x, y, l, e, g);
    end
  endtask

  initial begin
    for (int x = 0; x < 2; x++)
      for (int y = 0; y < 2; y++) begin
        a1 = 1'(x); b1 = 1'(y);
        @(posedge clk);
        check("w1", x, y, l1, e1, g1);
      end
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x); b4 = 4'(y);
        @(posedge clk);
        check("w4", x, y, l4, e4, g4);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
