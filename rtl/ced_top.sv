// ced_top: a control block with four FSMs, each protected by a different CED
// scheme, and one global two-rail error indication.
//
// Instance k of the example FSM runs on its own inputs go[k], sigY[k] and
// drives its own outputs y[k]:
//   k = 0 : parity scheme        (ced_parity)
//   k = 1 : one-hot scheme       (ced_onehot)
//   k = 2 : hybrid parity scheme (ced_hybrid)
//   k = 3 : duplication scheme   (ced_dup)
// Each protected FSM reports a two-rail error pair err_fsm[k]; a trc_tree
// stitches the four into the global pair err (rails differ = no error,
// 00 or 11 = an error somewhere). All FSMs share clk and the synchronous reset.
// Choosing a scheme per FSM and merging the error signals into two global
// two-rail signals follows the document; putting one FSM of each scheme side
// by side is this design's way of showing all four in one block.
module ced_top
  import ced_pkg::*;
(
  input  logic                      clk,
  input  logic                      reset,
  input  logic     [3:0]            go,
  input  logic     [3:0]            sigY,
  output logic     [3:0][NOUT-1:0]  y,
  output tworail_t [3:0]            err_fsm,
  output tworail_t                  err
);

  ced_parity u_parity (.clk(clk), .reset(reset), .go(go[0]), .sigY(sigY[0]),
                       .y(y[0]), .err(err_fsm[0]));

  ced_onehot u_onehot (.clk(clk), .reset(reset), .go(go[1]), .sigY(sigY[1]),
                       .y(y[1]), .err(err_fsm[1]));

  ced_hybrid u_hybrid (.clk(clk), .reset(reset), .go(go[2]), .sigY(sigY[2]),
                       .y(y[2]), .err(err_fsm[2]));

  ced_dup    u_dup    (.clk(clk), .reset(reset), .go(go[3]), .sigY(sigY[3]),
                       .y(y[3]), .err(err_fsm[3]));

  trc_tree #(.N(4)) u_stitch (.in(err_fsm), .z(err));

endmodule
