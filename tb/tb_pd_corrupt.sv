// tb_pd_corrupt: checks that a domain's outputs pass while its supply and
// ground are on, and read all ones when either is off or ground is not 0 V.
module tb_pd_corrupt;
  import lp_pkg::*;
  supply_t    pwr, gnd;
  logic [3:0] d_in, d_out;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  pd_corrupt #(.WIDTH(4)) dut (.pwr(pwr), .gnd(gnd), .d_in(d_in), .d_out(d_out));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("tb_pd_corrupt: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic [3:0] exp, string what);
    @(posedge clk);
    checks++;
    if (d_out !== exp) begin
      failures++;
      $display("FAIL %s: d_in=%h d_out=%h expected %h", what, d_in, d_out, exp);
    end
  endtask

  initial begin
    gnd = supply_on(VSS_MV);
    for (int i = 0; i < 40; i++) begin
      d_in = 4'($urandom);
      case (i % 4)
        0: begin pwr = supply_on(VDD2_MV);  expect_out(d_in,  "powered"); end
        1: begin pwr = SUPPLY_OFF;          expect_out(4'hF,  "power off"); end
        2: begin pwr = supply_on(VDD1_MV); gnd = SUPPLY_OFF;
                 expect_out(4'hF, "ground off"); gnd = supply_on(VSS_MV); end
        default: begin pwr = supply_on(VDD1_MV); gnd = supply_on(16'd200);
                 expect_out(4'hF, "ground not at 0 V"); gnd = supply_on(VSS_MV); end
      endcase
    end
    // a zero value must pass too, so an all-ones corruption is distinguishable
    pwr = supply_on(VDD1_MV); d_in = 4'h0; expect_out(4'h0, "powered zero");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
