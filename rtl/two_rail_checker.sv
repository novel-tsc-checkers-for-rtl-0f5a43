// Two-pair two-rail checker.
//
// Takes two signal pairs that should each be complementary and folds them
// into one output pair that is complementary exactly when both input pairs
// are. It is the standard AND-OR two-rail cell:
//   z[1] = a[1]&b[1] | a[0]&b[0]
//   z[0] = a[1]&b[0] | a[0]&b[1]
// The paper only names a two-rail checker here; this particular cell is
// this design's choice as the simplest one with that function.
//
// Interface: a, b input pairs; z output pair. Combinational.
module two_rail_checker (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [1:0] z
);

  assign z[1] = (a[1] & b[1]) | (a[0] & b[0]);
  assign z[0] = (a[1] & b[0]) | (a[0] & b[1]);

endmodule
