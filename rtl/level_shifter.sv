// level_shifter: behavioural model of the level-shifter cell (LS_COMP).
//
// Behavioural model, not synthesizable logic: a level shifter is an analog
// cell that re-drives a logic value from one supply voltage to another. Its
// logic function is a buffer (y = data); what this model adds is the cell's
// dependence on both supplies. The output is valid only while the input-side
// supply (pwr1, the 1.0 V VDD2 of PD_COMP), the output-side supply (pwr, the
// 1.8 V Pwr1) and ground are all on, as in the cell's power_down_function
// "(!pwr + !pwr1 + gnd)"; otherwise every bit reads lp_pkg::CORRUPT_BIT.
// While powered, an assertion checks that the input-side voltage lies in the
// cell's input range, 0.9 V to 1.1 V by default. The cell converts in either
// direction (the strategy's rule "both"). Zero delay: the library's 1.4 ns /
// 1.6 ns cell delays are not modelled.
module level_shifter
  import lp_pkg::*;
#(
  parameter int unsigned WIDTH     = 1,
  parameter int unsigned IN_MIN_MV = 900,   // input_voltage_range low end
  parameter int unsigned IN_MAX_MV = 1100   // input_voltage_range high end
) (
  input  supply_t          pwr,    // output-side power (std_cell_main_rail)
  input  supply_t          pwr1,   // input-side power
  input  supply_t          gnd,    // common ground
  input  logic [WIDTH-1:0] data,   // value in the input-side domain
  output logic [WIDTH-1:0] y       // the same value in the output-side domain
);

  logic live;

  always_comb begin
    live = powered(pwr, gnd) && powered(pwr1, gnd);
    y    = live ? data : {WIDTH{CORRUPT_BIT}};
  end

  // The input-side voltage must be one the cell is characterised for.
  always_comb begin
    if (live) begin
      assert (int'(pwr1.mv) >= IN_MIN_MV && int'(pwr1.mv) <= IN_MAX_MV)
        else $error("level_shifter: input supply %0d mV outside %0d..%0d mV",
                    pwr1.mv, IN_MIN_MV, IN_MAX_MV);
    end
  end

endmodule
