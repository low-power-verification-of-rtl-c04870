// retention_cell: behavioural model of a state-retention register.
//
// Behavioural model: the real part is a flip-flop on a switchable supply
// (VDD) with a shadow storage element on an always-on retention supply
// (VRET). The pins are those of the generic retention cell the design's
// power-management concepts describe: D, CLK, Q, SAVE, RESTORE, VDD, VRET,
// VSS. On a rising CLK edge:
//   SAVE = 1     the shadow copies Q (done before VDD is switched off);
//   RESTORE = 1  the flop loads the shadow instead of D (after VDD returns);
//   otherwise    the flop loads D.
// While VDD is off the flop loses its value (Q reads lp_pkg::CORRUPT_BIT);
// while VRET is off the shadow loses its value too. That the save and
// restore act on a clock edge, and that RESTORE wins over SAVE, are this
// model's choices: the cell description names the pins but not their timing.
// No reset pin: the flop starts from whatever D loads.
module retention_cell
  import lp_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  supply_t          vdd,      // switchable main supply
  input  supply_t          vret,     // always-on retention supply
  input  supply_t          vss,      // ground
  input  logic             clk,      // CLK
  input  logic             save,     // SAVE: copy Q into the shadow
  input  logic             restore,  // RESTORE: load the shadow into the flop
  input  logic [WIDTH-1:0] d,        // D
  output logic [WIDTH-1:0] q         // Q
);

  logic             vdd_ok;
  logic             vret_ok;
  logic [WIDTH-1:0] flop;
  logic [WIDTH-1:0] shadow;

  assign vdd_ok  = powered(vdd, vss);
  assign vret_ok = powered(vret, vss);

  // Main flop: corrupted when its supply drops, reloaded from D or shadow.
  always_ff @(posedge clk or negedge vdd_ok) begin
    if (!vdd_ok)      flop <= {WIDTH{CORRUPT_BIT}};
    else if (restore) flop <= shadow;
    else              flop <= d;
  end

  // Shadow: keeps its value as long as VRET stays on.
  always_ff @(posedge clk or negedge vret_ok) begin
    if (!vret_ok)                       shadow <= {WIDTH{CORRUPT_BIT}};
    else if (save && !restore && vdd_ok) shadow <= flop;
  end

  assign q = vdd_ok ? flop : {WIDTH{CORRUPT_BIT}};

endmodule
