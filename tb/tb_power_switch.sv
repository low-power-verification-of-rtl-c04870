// tb_power_switch: the switched supply must copy the input supply (state and
// voltage) while swctrl = 1 and be off while swctrl = 0.
module tb_power_switch;
  import lp_pkg::*;
  supply_t swin, swout;
  logic    swctrl;
  logic    clk = 1'b0;
  int      checks = 0, failures = 0;

  power_switch dut (.swin(swin), .swctrl(swctrl), .swout(swout));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("tb_power_switch: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      swctrl = 1'(i);
      case ((i >> 1) % 3)
        0:       swin = supply_on(VDD1_MV);
        1:       swin = supply_on(16'(1000 + 50 * i));
        default: swin = SUPPLY_OFF;
      endcase
      @(posedge clk);
      checks++;
      if (swctrl ? (swout !== swin) : swout.on) begin
        failures++;
        $display("FAIL swctrl=%b swin=%b/%0d swout=%b/%0d", swctrl, swin.on, swin.mv, swout.on, swout.mv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
