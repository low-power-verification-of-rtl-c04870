// tb_design_top: end-to-end test of the power-managed example design at its
// default parameters.
//
// Phases:
//   1. All supplies on (power-table state_1): every adder and comparator
//      input combination, outputs checked against integer arithmetic, and the
//      two vectors of the reference waveform (in1 = in2 = 1, in3 1 -> 0;
//      in4 1 -> 0, in5 0 -> 1) checked against their published values.
//   2. Isolation while powered: iso_en = 1 clamps equal, L and G to 0.
//   3. PD_COMP power-down in the legal order (iso_en up, VDD2 off, inputs
//      toggle, VDD2 on, iso_en down): outputs stay clamped to 0, the adder
//      keeps working, state_2 is reported; after power-up the comparator is
//      correct again.
//   4. PD_MOD switched off and on through swCtl (state_3, then state_4 with
//      PD_COMP off as well): VDD1_sw follows swCtl, signals to m3 stay valid.
//   5. VDD1 off: the table reports an illegal combination and the always-on
//      outputs, the isolation cells' included, read corrupt.
//   6. Retention register: save, main supply off, restore.
// Each mechanism is counted; one that never happened is a failure.
module tb_design_top;
  import lp_pkg::*;

  supply_t    VDD1, VDD2, VSS, VDD1_sw, ret_vdd, ret_vret;
  logic       swCtl, iso_en;
  logic       in1, in2, in3, in4, in5;
  logic       sum, equal, p3_a, p3_b, p3_c, p3_d;
  pst_state_e pst_state;
  logic       pst_legal;
  logic       ret_clk = 1'b0, ret_save, ret_restore, ret_d, ret_q;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_state [5] = '{default: 0};
  int n_clamp_live = 0, n_clamp_off = 0, n_pass = 0, n_sw_off = 0, n_sw_on = 0;
  int n_corrupt = 0, n_retained = 0, n_ref_vec = 0;

  design_top dut (
    .VDD1(VDD1), .VDD2(VDD2), .VSS(VSS), .swCtl(swCtl), .iso_en(iso_en),
    .in1(in1), .in2(in2), .in3(in3), .in4(in4), .in5(in5),
    .sum(sum), .equal(equal), .p3_a(p3_a), .p3_b(p3_b), .p3_c(p3_c), .p3_d(p3_d),
    .VDD1_sw(VDD1_sw), .pst_state(pst_state), .pst_legal(pst_legal),
    .ret_vdd(ret_vdd), .ret_vret(ret_vret), .ret_clk(ret_clk), .ret_save(ret_save),
    .ret_restore(ret_restore), .ret_d(ret_d), .ret_q(ret_q)
  );

  always #5 ret_clk = ~ret_clk;

  initial begin : watchdog
    repeat (10000) @(posedge ret_clk);
    failures++;
    $display("tb_design_top: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (in=%b%b%b%b%b sum=%b eq=%b p3=%b%b%b%b state=%0d)", what,
               in1, in2, in3, in4, in5, sum, equal, p3_a, p3_b, p3_c, p3_d, pst_state);
    end
  endtask

  task automatic settle();
    #1;
    if (pst_legal) n_state[int'(pst_state)]++;
  endtask

  // Check every output of the example against arithmetic on the inputs,
  // with the comparator's flags forced to 0 when they are isolated.
  task automatic check_outputs(logic comp_clamped, string what);
    int total;
    total = int'(in1) + int'(in2) + int'(in3);
    check(sum  == total[0], {what, ": sum"});
    check(p3_a == total[0], {what, ": m3.A = sum"});
    check(p3_c == total[1], {what, ": m3.C = Cout"});
    if (comp_clamped) begin
      check({p3_b, equal, p3_d} == 3'b000, {what, ": comparator clamped"});
    end else begin
      check(p3_b  == (in4 < in5),  {what, ": m3.B = L"});
      check(equal == (in4 == in5), {what, ": equal"});
      check(p3_d  == (in4 > in5),  {what, ": m3.D = G"});
    end
  endtask

  task automatic sweep(logic comp_clamped, string what);
    for (int v = 0; v < 32; v++) begin
      {in1, in2, in3, in4, in5} = 5'(v);
      settle();
      check_outputs(comp_clamped, what);
    end
  endtask

  initial begin
    // ---------- power-up: state_1 ----------
    VSS = supply_on(VSS_MV); VDD1 = supply_on(VDD1_MV); VDD2 = supply_on(VDD2_MV);
    swCtl = 1'b1; iso_en = 1'b0;
    ret_vdd = supply_on(VDD1_MV); ret_vret = supply_on(VDD1_MV);
    ret_save = 0; ret_restore = 0; ret_d = 0;
    {in1, in2, in3, in4, in5} = '0;
    settle();
    check(pst_state == PST_STATE_1 && pst_legal, "state_1 at power-up");
    check(VDD1_sw.on && VDD1_sw.mv == VDD1_MV, "VDD1_sw on at 1.8 V");

    // ---------- phase 1: full function ----------
    sweep(1'b0, "state_1");
    n_pass++;

    // reference waveform vectors: before and after the cursor
    in1 = 1; in2 = 1; in3 = 1; in4 = 1; in5 = 0; settle();
    check({sum, p3_a, p3_c, p3_b, p3_d, equal} == 6'b111010, "reference vector before cursor");
    n_ref_vec++;
    in3 = 0; in4 = 0; in5 = 1; settle();
    check({sum, p3_a, p3_c, p3_b, p3_d, equal} == 6'b001100, "reference vector after cursor");
    n_ref_vec++;

    // ---------- phase 2: isolation with PD_COMP powered ----------
    iso_en = 1'b1;
    sweep(1'b1, "isolated, powered");
    n_clamp_live++;
    iso_en = 1'b0; settle();

    // ---------- phase 3: PD_COMP power-down ----------
    iso_en = 1'b1; settle();
    VDD2 = SUPPLY_OFF; settle();
    check(pst_state == PST_STATE_2, "state_2 with VDD2 off");
    sweep(1'b1, "PD_COMP off");
    n_clamp_off++;
    VDD2 = supply_on(VDD2_MV); settle();
    check(pst_state == PST_STATE_1, "state_1 after VDD2 returns");
    iso_en = 1'b0; settle();
    sweep(1'b0, "PD_COMP back on");
    n_pass++;

    // ---------- phase 4: PD_MOD switched ----------
    swCtl = 1'b0; settle();
    check(!VDD1_sw.on, "VDD1_sw off with swCtl = 0");
    check(pst_state == PST_STATE_3, "state_3 with PD_MOD off");
    n_sw_off++;
    sweep(1'b0, "PD_MOD off");
    iso_en = 1'b1; settle();
    VDD2 = SUPPLY_OFF; settle();
    check(pst_state == PST_STATE_4, "state_4 with both off");
    sweep(1'b1, "PD_COMP and PD_MOD off");
    n_clamp_off++;
    VDD2 = supply_on(VDD2_MV); settle();
    iso_en = 1'b0; settle();
    swCtl = 1'b1; settle();
    check(VDD1_sw.on && VDD1_sw.mv == VDD1_MV, "VDD1_sw back on");
    check(pst_state == PST_STATE_1, "state_1 after PD_MOD returns");
    n_sw_on++;
    sweep(1'b0, "all on again");

    // ---------- phase 5: VDD1 off is outside the table ----------
    VDD1 = SUPPLY_OFF; settle();
    check(!pst_legal && pst_state == PST_ILLEGAL, "VDD1 off is illegal");
    in1 = 0; in2 = 0; in3 = 0; settle();
    check(sum == CORRUPT_BIT && p3_c == CORRUPT_BIT, "PD_TOP outputs corrupt with VDD1 off");
    iso_en = 1'b1; settle();   // a clamp needs the cell's own supply
    check(equal == CORRUPT_BIT && p3_b == CORRUPT_BIT && p3_d == CORRUPT_BIT,
          "isolation outputs corrupt with their supply VDD1 off");
    iso_en = 1'b0; settle();
    check(!VDD1_sw.on, "VDD1_sw follows VDD1 off");
    n_corrupt++;
    VDD1 = supply_on(VDD1_MV); settle();
    check(pst_state == PST_STATE_1, "state_1 after VDD1 returns");
    sweep(1'b0, "after VDD1 returns");

    // ---------- phase 6: retention register ----------
    for (int r = 0; r < 4; r++) begin
      logic bitv;
      bitv = 1'(r);
      @(negedge ret_clk) ret_d = bitv;
      @(negedge ret_clk) ret_save = 1;
      @(negedge ret_clk) ret_save = 0; ret_d = ~bitv;
      @(negedge ret_clk) check(ret_q == ~bitv, "retention: normal load");
      ret_vdd = SUPPLY_OFF;
      @(negedge ret_clk) check(ret_q == CORRUPT_BIT, "retention: corrupt while off");
      ret_vdd = supply_on(VDD1_MV);
      ret_restore = 1;
      @(negedge ret_clk) ret_restore = 0;
      check(ret_q == bitv, "retention: value restored");
      n_retained++;
    end

    // ---------- coverage of mechanisms ----------
    for (int s = 1; s <= 4; s++) begin
      checks++;
      if (n_state[s] == 0) begin failures++; $display("FAIL power-table state_%0d never reached", s); end
    end
    begin
      int counts [8];
      string names [8];
      counts = '{n_clamp_live, n_clamp_off, n_pass, n_sw_off, n_sw_on, n_corrupt, n_retained, n_ref_vec};
      names  = '{"isolation clamp while powered", "isolation clamp while PD_COMP off",
                 "comparator pass-through", "PD_MOD switch off", "PD_MOD switch on",
                 "corruption of an unpowered domain", "retention save/restore",
                 "reference waveform vectors"};
      for (int i = 0; i < 8; i++) begin
        checks++;
        $display("mechanism %-36s happened %0d times", names[i], counts[i]);
        if (counts[i] == 0) begin failures++; $display("FAIL mechanism never happened: %s", names[i]); end
      end
    end
    $display("power-table visits: state_1=%0d state_2=%0d state_3=%0d state_4=%0d",
             n_state[1], n_state[2], n_state[3], n_state[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
