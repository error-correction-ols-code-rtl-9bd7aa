// ols_two_rail_checker: self-checking parity checker built on a repetition
// code, used by both the encoder and the syndrome computation.
//
// The checker splits its inputs into two disjoint sets x and y and forms one
// parity per set: r1 = XOR of x, r2 = XOR of y, each as a separate XOR tree.
// When the inputs have the expected (even) overall parity the pair {r1, r2}
// is 00 or 11; a wrong input parity, or a fault inside either tree, gives 01
// or 10. A final XOR turns the pair into the single flag e = r1 ^ r2, which is
// 1 only in the error case. The split into two sets, the outputs r1/r2 and the
// final XOR follow the original scheme; the set sizes are parameters.
//
// In the encoder x = c1..c(tm) and y = c(tm+1)..c(2tm); in the syndrome
// computation x = s1..s(2tm) and y = c1..c(2tm). Purely combinational.
module ols_two_rail_checker #(
  parameter int unsigned NA = ols_pkg::T_DEFAULT * ols_pkg::M_DEFAULT,  // first set, tm
  parameter int unsigned NB = ols_pkg::T_DEFAULT * ols_pkg::M_DEFAULT   // second set, tm
) (
  input  logic [NA:1] x,
  input  logic [NB:1] y,
  output logic        r1,  // parity of x
  output logic        r2,  // parity of y
  output logic        e    // 1: the rails disagree, an error was seen
);

  always_comb begin
    r1 = ^x;
    r2 = ^y;
    e  = r1 ^ r2;
  end

endmodule
