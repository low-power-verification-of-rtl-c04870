// tb_retention_cell: load a value, save it, power the main supply down (the
// output must read corrupt), power it up, restore, and check the value is
// back; also check that a value is lost when the retention supply drops, and
// that normal loads work between power cycles. Four-bit instance.
module tb_retention_cell;
  import lp_pkg::*;
  supply_t    vdd, vret, vss;
  logic       clk = 1'b0;
  logic       save, restore;
  logic [3:0] d, q;
  int         checks = 0, failures = 0;
  int         cycles_restored = 0;

  retention_cell #(.WIDTH(4)) dut (.vdd(vdd), .vret(vret), .vss(vss), .clk(clk),
                                   .save(save), .restore(restore), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("tb_retention_cell: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_q(logic [3:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
  endtask

  initial begin
    vss = supply_on(VSS_MV); vdd = supply_on(VDD1_MV); vret = supply_on(VDD1_MV);
    save = 0; restore = 0; d = 4'h0;
    for (int round = 0; round < 20; round++) begin
      logic [3:0] keep, other;
      keep  = 4'($urandom);
      other = ~keep;
      if (round == 0) keep = 4'h0;
      // normal load
      @(negedge clk) d = keep;
      @(negedge clk) expect_q(keep, "load");
      // save
      save = 1;
      @(negedge clk) save = 0; d = other;
      @(negedge clk) expect_q(other, "load after save");
      // power down main supply
      vdd = SUPPLY_OFF;
      @(negedge clk) expect_q(4'hF, "while VDD off");
      @(negedge clk);
      vdd = supply_on(VDD1_MV);
      // restore: one clock edge with RESTORE brings the value back
      restore = 1;
      @(negedge clk) restore = 0;
      cycles_restored++;
      expect_q(keep, "after restore");
      // a normal load follows
      d = other;
      @(negedge clk) expect_q(other, "load after restore");
    end
    // losing VRET during power-down loses the saved value
    d = 4'h5; @(negedge clk); save = 1; @(negedge clk) save = 0;
    vdd = SUPPLY_OFF; vret = SUPPLY_OFF;
    @(negedge clk) vret = supply_on(VDD1_MV); vdd = supply_on(VDD1_MV);
    restore = 1; @(negedge clk) restore = 0;
    expect_q(4'hF, "restore after VRET loss");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
