// ex_fsm: the example control FSM, complete (next-state logic, state register,
// output logic).
//
// The state register ps is W bits wide, W set by the state code ENC (2 bits
// binary, 3 bits with parity, 4 bits one-hot, see ced_pkg). It loads the next
// state on every rising clock edge; reset is synchronous and lives in the
// next-state logic, so ps holds S0 one clock after a cycle with reset high.
// Outputs y are combinational from ps and the inputs (Mealy). The present state
// is brought out so that a checker can watch it.
// The structure (state register plus next-state and output logic written with
// re-encoded state constants) follows the document; the clock and the register
// being a plain edge-triggered flip-flop bank are this design's choice.
module ex_fsm
  import ced_pkg::*;
#(
  parameter enc_e        ENC = ENC_BINARY,
  parameter int unsigned W   = state_w(ENC)
) (
  input  logic            clk,
  input  logic            reset,
  input  logic            go,
  input  logic            sigY,
  output logic [NOUT-1:0] y,
  output logic [W-1:0]    ps
);

  logic [W-1:0] ns;

  ex_fsm_next #(.ENC(ENC), .W(W)) u_next (.ps(ps), .reset(reset), .go(go), .ns(ns));

  always_ff @(posedge clk) ps <= ns;

  ex_fsm_out #(.ENC(ENC), .W(W)) u_out (.ps(ps), .go(go), .sigY(sigY), .y(y));

endmodule
