// compressor42: the "4:2" compressor cell used to shorten the vertical
// (same-column) path of the multiplier's reduction tree.
//
// It is two fast full adders in cascade. The first adds a, b and cin. Its
// sum (sum1, a slow output) is wired to the fast input of the second adder,
// which also adds d and e; d and e start through the second adder's slow
// XOR while the first adder is still settling, so every input reaches the
// final sum after about three XOR delays.
//
// All five inputs have the same weight w. Outputs: sum (weight w) and two
// carries cout1, cout2 (weight 2w), so a + b + cin + d + e ==
// sum + 2*(cout1 + cout2). sum1 is brought out for observability only.
// Timing: purely combinational.
//
// The cascade and the sum1-to-fast-input connection follow the published
// optimised cell; port names are this design's own.
module compressor42 (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic d,
  input  logic e,
  output logic sum1,
  output logic sum,
  output logic cout1,
  output logic cout2
);
  fa_fast u_fa1 (.a(a), .b(b), .cin(cin),  .sum(sum1), .cout(cout1));
  fa_fast u_fa2 (.a(d), .b(e), .cin(sum1), .sum(sum),  .cout(cout2));
endmodule
