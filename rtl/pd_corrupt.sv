// pd_corrupt: output model of a power domain whose supply can go away.
//
// A powered domain drives its logic values; a domain whose primary power or
// ground is off drives nothing meaningful. In a low-power simulation the
// outputs of a dead domain are corrupted; this 2-state model replaces every
// output bit with lp_pkg::CORRUPT_BIT while the domain is unpowered, so that
// whatever reads it can see the difference between a live value, a corrupt
// value and an isolation clamp. Combinational; the supply struct is the
// domain's primary power and ground net (see lp_pkg::supply_t).
// The corruption rule follows the Liberty power_down_function of the
// design's cells; the all-ones corrupt value is this model's choice.
module pd_corrupt
  import lp_pkg::*;
#(
  parameter int unsigned WIDTH = 1
) (
  input  supply_t          pwr,     // primary power net of the domain
  input  supply_t          gnd,     // primary ground net of the domain
  input  logic [WIDTH-1:0] d_in,    // outputs of the domain's logic
  output logic [WIDTH-1:0] d_out    // the same outputs as seen from outside
);

  always_comb begin
    if (powered(pwr, gnd)) d_out = d_in;
    else                   d_out = {WIDTH{CORRUPT_BIT}};
  end

endmodule
