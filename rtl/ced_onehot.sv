// ced_onehot: the example FSM protected by the one-hot CED scheme.
//
// The four states are re-encoded one-hot (state i -> only bit i set), so the
// state register is 4 bits wide (ex_fsm with ENC_ONEHOT). A one-hot checker
// watches the present state; a parity checker watches the outputs together
// with the predicted output parity from ex_fsm_outpar (the word {py, y} must
// have even parity). The two two-rail results are merged by a trc cell into
// the error pair err.
//
// Interface and timing as ced_parity: clk, synchronous reset, inputs go and
// sigY, outputs y, two-rail err (valid = rails differ), checked in the same
// cycle. The scheme follows the document; the one-hot checker circuit and the
// merging cell are this design's choice.
module ced_onehot
  import ced_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            go,
  input  logic            sigY,
  output logic [NOUT-1:0] y,
  output tworail_t        err
);

  localparam int unsigned W = state_w(ENC_ONEHOT);

  logic [W-1:0] ps;
  logic         py;
  tworail_t     z_state, z_out;

  ex_fsm #(.ENC(ENC_ONEHOT), .W(W)) u_fsm (
    .clk(clk), .reset(reset), .go(go), .sigY(sigY), .y(y), .ps(ps)
  );

  ex_fsm_outpar #(.ENC(ENC_ONEHOT), .W(W)) u_pred (
    .ps(ps), .go(go), .sigY(sigY), .py(py)
  );

  onehot_checker #(.W(W)) u_ohchk (.d(ps), .z(z_state));

  parity_checker #(.W(NOUT + 1), .ODD(1'b0)) u_pchk (.d({py, y}), .z(z_out));

  trc u_merge (.a(z_state), .b(z_out), .z(err));

endmodule
