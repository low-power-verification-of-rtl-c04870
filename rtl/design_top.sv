// design_top: the power-managed example design.
//
// Three partitions share one top. P1, the full adder (instance "adder"), sits
// in the always-on domain PD_TOP on VDD1 (1.8 V). P2, the comparator
// (instance "comp"), is its own domain PD_COMP on a separate supply VDD2
// (1.0 V) that may be switched off. P3 (instance "m3") is the domain PD_MOD,
// fed from VDD1 through the power switch SW under the control port swCtl.
// The adder's sum and carry and the comparator's L and G flags go to m3; the
// comparator's E flag is the design's output "equal" and the adder's sum is
// also the output "sum".
//
// Every output of PD_COMP crosses into 1.8 V logic, so it passes first
// through a level shifter (LS_COMP, 1.0 V to 1.8 V) and then through an
// isolation cell (ISO_COMP) on the always-on supply VDD1, clamping to 0
// while iso_en is 1. Placing the isolation after the level shifter keeps the clamp
// valid when VDD2 is off, since the shifter is dead then; that order is this
// model's choice.
//
// m3's logic function is not known, so m3 is not part of this top: its four
// inputs (p3_a = sum, p3_b = L, p3_c = Cout, p3_d = G, after the crossing
// cells) and its switched supply VDD1_sw are brought out as ports, for an
// m3 model to be attached outside. A power-state-table monitor reports which
// legal supply combination the design is in. Beside the example, and not
// wired to it, sits one retention register with its own supplies and pins,
// the generic retention cell of the power-management concepts.
//
// Supplies are lp_pkg::supply_t structs (on flag + millivolts). A powered-off
// domain drives lp_pkg::CORRUPT_BIT on its outputs. Everything except the
// retention register is combinational. An assertion requires iso_en to be 1
// whenever PD_COMP is unpowered.
module design_top
  import lp_pkg::*;
(
  // supply ports
  input  supply_t    VDD1,        // always-on 1.8 V supply (Pwr1)
  input  supply_t    VDD2,        // 1.0 V supply of PD_COMP (Pwr2)
  input  supply_t    VSS,         // ground (Gnd)
  // power-control logic ports
  input  logic       swCtl,       // 1 closes switch SW, powering PD_MOD
  input  logic       iso_en,      // 1 clamps PD_COMP's outputs to 0
  // functional inputs
  input  logic       in1,         // adder A
  input  logic       in2,         // adder B
  input  logic       in3,         // adder Cin
  input  logic       in4,         // comp A
  input  logic       in5,         // comp B
  // functional outputs
  output logic       sum,         // adder sum
  output logic       equal,       // comp E, isolated and level shifted
  // connections to the m3 partition (PD_MOD)
  output logic       p3_a,        // m3 A: adder sum
  output logic       p3_b,        // m3 B: comp L
  output logic       p3_c,        // m3 C: adder Cout
  output logic       p3_d,        // m3 D: comp G
  output supply_t    VDD1_sw,     // switched supply of PD_MOD
  // power state table monitor
  output pst_state_e pst_state,
  output logic       pst_legal,
  // stand-alone retention register
  input  supply_t    ret_vdd,
  input  supply_t    ret_vret,
  input  logic       ret_clk,
  input  logic       ret_save,
  input  logic       ret_restore,
  input  logic       ret_d,
  output logic       ret_q
);

  // ---------------- PD_TOP: adder (P1) ----------------
  logic       add_sum, add_cout;
  logic [1:0] top_out;

  adder u_adder (
    .a    (in1),
    .b    (in2),
    .cin  (in3),
    .sum  (add_sum),
    .cout (add_cout)
  );

  pd_corrupt #(.WIDTH(2)) u_pd_top (
    .pwr   (VDD1),
    .gnd   (VSS),
    .d_in  ({add_cout, add_sum}),
    .d_out (top_out)
  );

  // ---------------- PD_COMP: comparator (P2) ----------------
  logic       cmp_l, cmp_e, cmp_g;
  logic [2:0] comp_out;     // {G, E, L} at the domain boundary, 1.0 V side
  logic [2:0] comp_ls;      // after LS_COMP, 1.8 V side
  logic [2:0] comp_clamp;   // ISO_COMP cell output
  logic [2:0] comp_iso;     // ISO_COMP output as seen on its supply, Pwr1

  comp #(.WIDTH(1)) u_comp (
    .a (in4),
    .b (in5),
    .l (cmp_l),
    .e (cmp_e),
    .g (cmp_g)
  );

  pd_corrupt #(.WIDTH(3)) u_pd_comp (
    .pwr   (VDD2),
    .gnd   (VSS),
    .d_in  ({cmp_g, cmp_e, cmp_l}),
    .d_out (comp_out)
  );

  level_shifter #(.WIDTH(3)) u_ls_comp (
    .pwr  (VDD1),
    .pwr1 (VDD2),
    .gnd  (VSS),
    .data (comp_out),
    .y    (comp_ls)
  );

  isolation_cell #(.WIDTH(3), .CLAMP_VALUE(1'b0), .SENSE_HIGH(1'b1)) u_iso_comp (
    .data   (comp_ls),
    .iso_en (iso_en),
    .y      (comp_clamp)
  );

  // The isolation cells run on Pwr1 (VDD1) and Gnd.
  pd_corrupt #(.WIDTH(3)) u_iso_supply (
    .pwr   (VDD1),
    .gnd   (VSS),
    .d_in  (comp_clamp),
    .d_out (comp_iso)
  );

  // ---------------- PD_MOD: switch for m3 (P3) ----------------
  power_switch u_sw (
    .swin   (VDD1),
    .swctrl (swCtl),
    .swout  (VDD1_sw)
  );

  // ---------------- outputs ----------------
  assign sum   = top_out[0];
  assign equal = comp_iso[1];
  assign p3_a  = top_out[0];
  assign p3_b  = comp_iso[0];
  assign p3_c  = top_out[1];
  assign p3_d  = comp_iso[2];

  // ---------------- power state table ----------------
  pst_monitor u_pst (
    .vdd1    (VDD1),
    .vdd2    (VDD2),
    .vdd1_sw (VDD1_sw),
    .vss     (VSS),
    .state   (pst_state),
    .legal   (pst_legal)
  );

  // Isolation must be on whenever PD_COMP has no power.
  always_comb begin
    if (!powered(VDD2, VSS) && powered(VDD1, VSS)) begin
      assert (iso_en) else $error("design_top: PD_COMP unpowered while iso_en is 0");
    end
  end

  // ---------------- stand-alone retention register ----------------
  retention_cell #(.WIDTH(1)) u_ret (
    .vdd     (ret_vdd),
    .vret    (ret_vret),
    .vss     (VSS),
    .clk     (ret_clk),
    .save    (ret_save),
    .restore (ret_restore),
    .d       (ret_d),
    .q       (ret_q)
  );

endmodule
