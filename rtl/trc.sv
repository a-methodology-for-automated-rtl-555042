// trc: two-rail checker cell.
//
// Combinational. Takes two two-rail pairs a and b and produces one two-rail
// pair z:
//   z[0] = a[0]&b[0] | a[1]&b[1]
//   z[1] = a[0]&b[1] | a[1]&b[0]
// z is a valid pair (rails differ) exactly when both a and b are valid, so a
// tree of these cells merges any number of error indications into one pair
// while staying self-checking. This is the textbook cell; the document asks
// for two-rail global error signals but does not draw the cell.
module trc
  import ced_pkg::*;
(
  input  tworail_t a,
  input  tworail_t b,
  output tworail_t z
);

  assign z[0] = (a[0] & b[0]) | (a[1] & b[1]);
  assign z[1] = (a[0] & b[1]) | (a[1] & b[0]);

endmodule
