// trc_tree: two-rail checker tree.
//
// Combinational. Merges N two-rail error indications into a single two-rail
// pair z using a tree of N-1 trc cells (depth ceil(log2 N) when N is a power of
// two). z is valid
// (rails differ) exactly when every input pair is valid. This is how the error
// indications of several protected FSMs, or of several checkers around one
// FSM, are stitched into two global error signals in two-rail code, as the
// document describes; the tree shape is this design's choice.
module trc_tree
  import ced_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  tworail_t [N-1:0] in,
  output tworail_t         z
);

  // nodes[0 .. N-1] are the inputs; node N+j is a trc cell over nodes 2j and
  // 2j+1, so the N-1 cells form a binary tree whose root is node 2N-2.
  tworail_t [2*N-2:0] nodes;

  assign nodes[N-1:0] = in;

  for (genvar j = 0; j < int'(N) - 1; j++) begin : g_cell
    trc u_trc (.a(nodes[2*j]), .b(nodes[2*j+1]), .z(nodes[N+j]));
  end

  assign z = nodes[2*N-2];

endmodule
