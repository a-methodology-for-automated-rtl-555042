// ced_dup: the example FSM protected by the duplication CED scheme.
//
// Two complete copies of the FSM in its original binary code (ex_fsm with
// ENC_BINARY: next-state logic, state register and output logic each) run on
// the same inputs. An equality checker compares their output vectors; any
// difference shows as an error on the two-rail pair err. The output y is taken
// from copy A. A state error that does not yet reach the outputs is flagged in
// the first cycle it does.
//
// Interface and timing as ced_parity: clk, synchronous reset, inputs go and
// sigY, outputs y, two-rail err (valid = rails differ), checked in the same
// cycle. The scheme (duplicate the FSM, compare the outputs) follows the
// document; the two-rail equality checker is this design's choice. A synthesis
// flow must be told to keep both copies. The ps ports of the two copies are
// left open on purpose, since only the outputs are compared.
module ced_dup
  import ced_pkg::*;
(
  input  logic            clk,
  input  logic            reset,
  input  logic            go,
  input  logic            sigY,
  output logic [NOUT-1:0] y,
  output tworail_t        err
);

  localparam int unsigned W = state_w(ENC_BINARY);

  logic [NOUT-1:0] y_b;

  ex_fsm #(.ENC(ENC_BINARY), .W(W)) u_fsm_a (
    .clk(clk), .reset(reset), .go(go), .sigY(sigY), .y(y), .ps()
  );

  ex_fsm #(.ENC(ENC_BINARY), .W(W)) u_fsm_b (
    .clk(clk), .reset(reset), .go(go), .sigY(sigY), .y(y_b), .ps()
  );

  eq_checker #(.W(NOUT)) u_eqchk (.a(y), .b(y_b), .z(err));

endmodule
