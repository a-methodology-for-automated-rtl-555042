// parity_checker: parity checker with two-rail output.
//
// Combinational. The W-bit word d is split into a low half A = d[W/2-1:0] and
// a high half B. z[0] is the XOR of A; z[1] is the XOR of B, inverted when the
// expected parity is even (ODD = 0). With the expected parity z[0] != z[1]
// (valid); a word with the wrong parity gives equal rails (error). Splitting
// the XOR in two keeps the checker self-testing: a stuck-at fault on either
// XOR tree turns some code word into an error indication. That the scheme uses
// a parity checker follows the document; the split into two trees is the
// standard construction and this design's choice. W must be at least 2.
module parity_checker
  import ced_pkg::*;
#(
  parameter int unsigned W   = 8,
  parameter bit          ODD = 1'b1
) (
  input  logic [W-1:0] d,
  output tworail_t     z
);

  localparam int unsigned H = W / 2;

  assign z[0] = ^d[H-1:0];
  assign z[1] = (^d[W-1:H]) ^ ~ODD;

  initial assert (W >= 2) else $error("parity_checker: W must be at least 2");

endmodule
