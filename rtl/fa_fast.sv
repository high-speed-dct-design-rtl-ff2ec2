// fa_fast: one-bit full adder with a designated fast input.
//
// The cell adds three bits of equal weight. It is arranged so that the
// inputs are not equivalent in delay: a and b pass through two XOR levels to
// reach sum, while cin enters only the last XOR, so cin is the "fast" input.
// The carry is the majority of the three inputs, formed from the three pair
// products in a single level, which makes cout the "fast" output.
// Multiplier trees built from this cell route late-arriving signals to cin.
//
// Interface: a, b (slow inputs), cin (fast input) -> sum, cout.
// Timing: purely combinational.
//
// The gate arrangement (XOR chain for the sum, three pair products merged
// for the carry) follows the published full-adder cell; the port names are
// this design's own.
module fa_fast (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);
  logic ab_x;

  always_comb begin
    ab_x = a ^ b;                                  // slow path: first XOR level
    sum  = ab_x ^ cin;                             // fast input enters the last XOR
    cout = (a & b) | (a & cin) | (b & cin);        // majority: one level of pair terms
  end
endmodule
