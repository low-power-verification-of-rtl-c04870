// isolation_cell: output isolation of a switchable power domain (ISO_COMP).
//
// Each bit passes through while the isolation control is inactive; while it
// is active the output is held at a fixed clamp value, so that a domain which
// is switched off cannot send corrupt values into powered logic. As in the
// design's isolation strategy the control is active high (iso_en = 1
// isolates) and the clamp value is 0; both are parameters. The cell sits on
// the always-on supply (Pwr1), so its own output never corrupts.
// Combinational: y follows iso_en and data with no clock.
// The design's library lists the cell function as "data * EN", which would
// pass data only while EN is 1; this model follows the strategy's
// active-high sense instead.
module isolation_cell #(
  parameter int unsigned WIDTH       = 1,
  parameter logic        CLAMP_VALUE = 1'b0,  // -clamp_value 0
  parameter logic        SENSE_HIGH  = 1'b1   // -isolation_sense high
) (
  input  logic [WIDTH-1:0] data,    // from the domain being isolated
  input  logic             iso_en,  // isolation control
  output logic [WIDTH-1:0] y        // to the powered-on side
);

  logic isolate;

  always_comb begin
    isolate = (iso_en == SENSE_HIGH);
    y       = isolate ? {WIDTH{CLAMP_VALUE}} : data;
  end

endmodule
