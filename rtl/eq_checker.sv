// eq_checker: self-checking equality checker with two-rail output.
//
// Combinational. Compares two W-bit words a and b. Each bit position forms the
// two-rail pair (a[i], ~b[i]), which is valid exactly when a[i] == b[i]; a
// trc_tree merges the W pairs into one pair z. z is valid when the words are
// equal and an error (00 or 11) when any bit differs. The duplication and
// hybrid schemes of the document use an equality checker; building it from
// two-rail cells is the standard self-checking form and this design's choice.
module eq_checker
  import ced_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output tworail_t     z
);

  tworail_t [W-1:0] pairs;

  always_comb begin
    for (int unsigned i = 0; i < W; i++) pairs[i] = {~b[i], a[i]};
  end

  trc_tree #(.N(W)) u_tree (.in(pairs), .z(z));

endmodule
