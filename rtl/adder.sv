// adder: the one-bit full adder of partition P1 (power domain PD_TOP).
//
// It adds its three one-bit inputs and returns the two-bit result as a sum
// bit and a carry-out bit: {cout, sum} = a + b + cin. The block's name and
// its pins (A, B, Cin, sum, Cout) are those of the example design; the
// full-adder function is the one those pins imply and agrees with the
// design's published simulation values. Purely combinational: outputs follow
// the inputs in the same cycle, with no clock or reset.
module adder (
  input  logic a,     // A
  input  logic b,     // B
  input  logic cin,   // Cin, carry in
  output logic sum,   // sum bit
  output logic cout   // Cout, carry out
);

  always_comb begin
    sum  = a ^ b ^ cin;
    cout = (a & b) | (cin & (a ^ b));
  end

endmodule
