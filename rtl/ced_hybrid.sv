// ced_hybrid: the example FSM protected by the hybrid parity CED scheme.
//
// As in the parity scheme, an odd-parity bit is added as MSB of the state code
// and a parity checker watches the 3-bit present state. Unlike it, the output
// logic is duplicated (a second ex_fsm_out on the same present state and
// inputs) and an equality checker compares the two output vectors. The two
// two-rail results are merged by a trc cell into err.
//
// Interface and timing as ced_parity: clk, synchronous reset, inputs go and
// sigY, outputs y (from the first copy of the output logic), two-rail err
// (valid = rails differ), checked in the same cycle. The scheme follows the
// document; the checker circuits are this design's choice. A synthesis flow
// must be told to keep the duplicate output logic, or it will merge the copies.
module ced_hybrid
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

  logic [W-1:0]    ps;
  logic [NOUT-1:0] y_dup;
  tworail_t        z_state, z_out;

  ex_fsm #(.ENC(ENC_PARITY), .W(W)) u_fsm (
    .clk(clk), .reset(reset), .go(go), .sigY(sigY), .y(y), .ps(ps)
  );

  ex_fsm_out #(.ENC(ENC_PARITY), .W(W)) u_out_dup (
    .ps(ps), .go(go), .sigY(sigY), .y(y_dup)
  );

  parity_checker #(.W(W), .ODD(1'b1)) u_pchk (.d(ps), .z(z_state));

  eq_checker #(.W(NOUT)) u_eqchk (.a(y), .b(y_dup), .z(z_out));

  trc u_merge (.a(z_state), .b(z_out), .z(err));

endmodule
