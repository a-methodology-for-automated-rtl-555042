// ced_parity: the example FSM protected by the parity CED scheme.
//
// The state register is widened by one bit: the MSB is an odd-parity bit over
// the state code, produced by the same next-state logic with re-encoded state
// constants (ex_fsm with ENC_PARITY). The outputs are checked by parity
// prediction: ex_fsm_outpar predicts the output parity from the present state
// and inputs. A single check bit c = (state parity bit) XOR (predicted output
// parity) lets one parity checker cover state and outputs together: the word
// {c, y, ps[1:0]} must have odd parity. A single-bit error in the state
// register, in the outputs or in the prediction makes the parity even and the
// two-rail error pair err shows 00 or 11.
//
// Interface: clk, synchronous reset (one clock to S0), inputs go and sigY,
// outputs y (same timing as the unprotected FSM) and err (two-rail, valid =
// rails differ). The check is combinational, in the same cycle as the
// corrupted state or output. The scheme and its single combined check bit
// follow the document; the clocking and the two-rail checker form are this
// design's choice.
module ced_parity
  import ced_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            go,
  input  logic            sigY,
  output logic [NOUT-1:0] y,
  output tworail_t        err
);

  localparam int unsigned W = state_w(ENC_PARITY);

  logic [W-1:0] ps;
  logic         py, c;

  ex_fsm #(.ENC(ENC_PARITY), .W(W)) u_fsm (
    .clk(clk), .reset(reset), .go(go), .sigY(sigY), .y(y), .ps(ps)
  );

  ex_fsm_outpar #(.ENC(ENC_PARITY), .W(W)) u_pred (
    .ps(ps), .go(go), .sigY(sigY), .py(py)
  );

  assign c = ps[W-1] ^ py;

  parity_checker #(.W(SBITS + NOUT + 1), .ODD(1'b1)) u_chk (
    .d({c, y, ps[SBITS-1:0]}), .z(err)
  );

endmodule
