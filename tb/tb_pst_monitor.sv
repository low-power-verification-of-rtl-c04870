// tb_pst_monitor: applies the four rows of the power state table and a set
// of combinations outside it, and checks the decoded row and legal flag.
module tb_pst_monitor;
  import lp_pkg::*;
  supply_t    vdd1, vdd2, vdd1_sw, vss;
  pst_state_e state;
  logic       legal;
  logic       clk = 1'b0;
  int         checks = 0, failures = 0;

  pst_monitor dut (.vdd1(vdd1), .vdd2(vdd2), .vdd1_sw(vdd1_sw), .vss(vss), .state(state), .legal(legal));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("tb_pst_monitor: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(pst_state_e exp, string what);
    @(posedge clk);
    checks++;
    if (state !== exp || legal !== (exp != PST_ILLEGAL)) begin
      failures++;
      $display("FAIL %s: state=%0d legal=%b expected %0d", what, state, legal, exp);
    end
  endtask

  initial begin
    vdd1 = supply_on(VDD1_MV); vss = supply_on(VSS_MV);
    vdd2 = supply_on(VDD2_MV); vdd1_sw = supply_on(VDD1_MV); expect_state(PST_STATE_1, "state_1");
    vdd2 = SUPPLY_OFF;         vdd1_sw = supply_on(VDD1_MV); expect_state(PST_STATE_2, "state_2");
    vdd2 = supply_on(VDD2_MV); vdd1_sw = SUPPLY_OFF;         expect_state(PST_STATE_3, "state_3");
    vdd2 = SUPPLY_OFF;         vdd1_sw = SUPPLY_OFF;         expect_state(PST_STATE_4, "state_4");
    // outside the table
    vdd1 = SUPPLY_OFF;                                       expect_state(PST_ILLEGAL, "VDD1 off");
    vdd1 = supply_on(16'd1000);                              expect_state(PST_ILLEGAL, "VDD1 at 1.0 V");
    vdd1 = supply_on(VDD1_MV); vdd2 = supply_on(VDD1_MV);    expect_state(PST_ILLEGAL, "VDD2 at 1.8 V");
    vdd2 = supply_on(VDD2_MV); vdd1_sw = supply_on(VDD2_MV); expect_state(PST_ILLEGAL, "VDD1_sw at 1.0 V");
    vdd1_sw = supply_on(VDD1_MV); vss = SUPPLY_OFF;          expect_state(PST_ILLEGAL, "VSS off");
    vss = supply_on(VSS_MV);                                 expect_state(PST_STATE_1, "back to state_1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
