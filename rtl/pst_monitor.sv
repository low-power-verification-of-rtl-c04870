// pst_monitor: classifies the present supply states against the power state
// table of the design.
//
// The table lists the only combinations of supply states the design may be
// in, over the supplies {VDD1, VDD2, VDD1_sw, VSS}:
//   state_1: ON_18 ON_10 ON_18 ON_00   (everything on)
//   state_2: ON_18 OFF   ON_18 ON_00   (PD_COMP off)
//   state_3: ON_18 ON_10 OFF   ON_00   (PD_MOD switched off)
//   state_4: ON_18 OFF   OFF   ON_00   (both off)
// The monitor decodes the four supplies into the matching row, or
// PST_ILLEGAL with legal = 0 when none matches (for example VDD1 off, or
// VDD2 at a voltage it has no state for). The table itself comes from the
// design's power intent, where it is only used by implementation tools; this
// decoder, which makes it visible in simulation, is this model's addition.
// Combinational.
module pst_monitor
  import lp_pkg::*;
(
  input  supply_t    vdd1,      // VDD1 supply port
  input  supply_t    vdd2,      // VDD2 supply port (PD_COMP)
  input  supply_t    vdd1_sw,   // switched supply of PD_MOD
  input  supply_t    vss,       // VSS ground port
  output pst_state_e state,     // matching table row
  output logic       legal      // 1 when a row matches
);

  logic base_ok;   // VDD1 at ON_18 and VSS at ON_00, common to every row
  logic comp_on;   // VDD2 at ON_10
  logic comp_off;  // VDD2 OFF
  logic mod_on;    // VDD1_sw at ON_18
  logic mod_off;   // VDD1_sw OFF

  always_comb begin
    base_ok  = is_on_18(vdd1) && is_on_00(vss);
    comp_on  = is_on_10(vdd2);
    comp_off = !vdd2.on;
    mod_on   = is_on_18(vdd1_sw);
    mod_off  = !vdd1_sw.on;

    state = PST_ILLEGAL;
    if (base_ok) begin
      if      (comp_on  && mod_on ) state = PST_STATE_1;
      else if (comp_off && mod_on ) state = PST_STATE_2;
      else if (comp_on  && mod_off) state = PST_STATE_3;
      else if (comp_off && mod_off) state = PST_STATE_4;
    end
    legal = (state != PST_ILLEGAL);
  end

endmodule
