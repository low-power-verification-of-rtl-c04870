// tb_adder: exhaustive self-check of the one-bit full adder.
// All eight input combinations are applied; the expected {cout, sum} is the
// integer sum of the three inputs. A watchdog ends the run after a fixed
// number of clock cycles.
module tb_adder;
  logic a, b, cin, sum, cout;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("tb_adder: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int exp_total;
      {a, b, cin} = 3'(v);
      exp_total = int'(v[2]) + int'(v[1]) + int'(v[0]);
      @(posedge clk);
      checks++;
      if ({cout, sum} != 2'(exp_total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b -> cout=%0b sum=%0b, expected %0d", a, b, cin, cout, sum, exp_total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
