// comp: the magnitude comparator of partition P2 (power domain PD_COMP).
//
// It compares two unsigned operands and raises exactly one of three flags:
// l when a < b, e when a == b, g when a > b. The block's name and its pins
// (A, B, L, E, G) are those of the example design, which compares single
// bits; the operand width is a parameter of this model (default 1, as in
// the design). Purely combinational, no clock or reset.
module comp #(
  parameter int unsigned WIDTH = 1
) (
  input  logic [WIDTH-1:0] a,   // A
  input  logic [WIDTH-1:0] b,   // B
  output logic             l,   // L: a less than b
  output logic             e,   // E: a equal to b
  output logic             g    // G: a greater than b
);

  always_comb begin
    l = (a < b);
    e = (a == b);
    g = (a > b);
  end

endmodule
