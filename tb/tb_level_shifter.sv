// tb_level_shifter: the shifter must pass data while both supplies and ground
// are on, and corrupt (all ones) when any of them is off.
module tb_level_shifter;
  import lp_pkg::*;
  supply_t    pwr, pwr1, gnd;
  logic [2:0] data, y;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  level_shifter #(.WIDTH(3)) dut (.pwr(pwr), .pwr1(pwr1), .gnd(gnd), .data(data), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("tb_level_shifter: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      logic out_on, in_on, gnd_on;
      {out_on, in_on, gnd_on} = 3'(i % 8);
      pwr  = out_on ? supply_on(VDD1_MV) : SUPPLY_OFF;
      pwr1 = in_on  ? supply_on(VDD2_MV) : SUPPLY_OFF;
      gnd  = gnd_on ? supply_on(VSS_MV)  : SUPPLY_OFF;
      data = 3'($urandom);
      if (i == 7) data = 3'b000;
      @(posedge clk);
      checks++;
      if (y !== ((out_on && in_on && gnd_on) ? data : 3'b111)) begin
        failures++;
        $display("FAIL pwr=%b pwr1=%b gnd=%b data=%b y=%b", out_on, in_on, gnd_on, data, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
