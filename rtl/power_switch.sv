// power_switch: behavioural model of the header switch SW of domain PD_MOD.
//
// Behavioural model, not synthesizable logic: the real part is a set of
// power transistors between a supply net and a switched net. When the
// control port matches the on-state (swctrl = 1, state SWon) the switch is
// closed and its output supply port carries the on/off state and voltage of
// its input supply port; when the control matches the off-state (!swctrl,
// state SWoff) the output is off. In the design the input is Pwr1 (VDD1,
// 1.8 V), the output is VDD1_sw, the primary power of PD_MOD, and the
// control is the logic port swCtl. Zero delay; the switch's ramp time is not
// modelled. A 2-state simulator has no X/Z control, so the undefined
// error-state of a real switch cannot arise here.
module power_switch
  import lp_pkg::*;
(
  input  supply_t swin,    // input supply port (Pwr1)
  input  logic    swctrl,  // control port (swCtl), 1 = on
  output supply_t swout    // output supply port (VDD1_sw)
);

  always_comb begin
    swout = swctrl ? swin : SUPPLY_OFF;
  end

endmodule
