// lp_pkg: types and constants shared by the power-aware model of the
// three-domain example design (adder, comparator and the switchable m3
// partition).
//
// A supply net is modelled as a small struct: an "on" flag and a voltage in
// millivolts. That is enough to express the port states of the power intent
// (ON_18 = 1.8 V, ON_10 = 1.0 V, ON_00 = 0.0 V ground, OFF) and to let the
// cell models corrupt their outputs when a supply they depend on is off.
// The voltages and the four legal supply combinations (the power state
// table) follow the design's power intent; the struct encoding and the
// corruption value are this model's own choices.
package lp_pkg;

  // One supply net: whether it is powered, and at what voltage.
  typedef struct packed {
    logic        on;
    logic [15:0] mv;
  } supply_t;

  // Port-state voltages of the power intent, in millivolts.
  localparam logic [15:0] VDD1_MV = 16'd1800;  // ON_18 on VDD1 and on the switched VDD1_sw
  localparam logic [15:0] VDD2_MV = 16'd1000;  // ON_10 on VDD2 (PD_COMP)
  localparam logic [15:0] VSS_MV  = 16'd0;     // ON_00 on VSS

  localparam supply_t SUPPLY_OFF = '{on: 1'b0, mv: 16'd0};

  // Build a powered supply of the given voltage.
  function automatic supply_t supply_on(logic [15:0] mv);
    return '{on: 1'b1, mv: mv};
  endfunction

  // A cell is powered when its power pin is on and its ground pin is on at 0 V,
  // the model of a Liberty power_down_function "(!pwr + gnd)".
  function automatic logic powered(supply_t pwr, supply_t gnd);
    return pwr.on && gnd.on && (gnd.mv == VSS_MV);
  endfunction

  // Value a powered-down output takes. A 2-state simulator has no X, so a
  // dead output is driven to all ones: distinct from the isolation clamp (0)
  // and, on the comparator, an impossible L/E/G combination.
  localparam logic CORRUPT_BIT = 1'b1;

  // Rows of the power state table over {VDD1, VDD2, VDD1_sw, VSS}.
  typedef enum logic [2:0] {
    PST_ILLEGAL = 3'd0,
    PST_STATE_1 = 3'd1,   // ON_18 ON_10 ON_18 ON_00 : all domains on
    PST_STATE_2 = 3'd2,   // ON_18 OFF   ON_18 ON_00 : PD_COMP off
    PST_STATE_3 = 3'd3,   // ON_18 ON_10 OFF   ON_00 : PD_MOD switched off
    PST_STATE_4 = 3'd4    // ON_18 OFF   OFF   ON_00 : both off
  } pst_state_e;

  // Port-state matchers.
  function automatic logic is_on_18(supply_t s);
    return s.on && (s.mv == VDD1_MV);
  endfunction

  function automatic logic is_on_10(supply_t s);
    return s.on && (s.mv == VDD2_MV);
  endfunction

  function automatic logic is_on_00(supply_t s);
    return s.on && (s.mv == VSS_MV);
  endfunction

endpackage
