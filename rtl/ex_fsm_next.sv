// ex_fsm_next: next-state logic of the example control FSM.
//
// Combinational. Reads the present state ps (in the code selected by ENC, see
// ced_pkg) and the inputs, and produces the next state ns in the same code.
// Reset is part of the next-state logic (a synchronous reset): while reset is
// high the next state is S0. Transitions:
//   S0 -> S1                      (unconditional)
//   S1 -> S2 if go, else stay
//   S2 -> S3
//   S3 -> S0 if go, else stay
//   any other code -> S3          (the default branch)
// The reset branch, S0 -> S1 and the default branch to S3 follow the example in
// the document; the other transitions and the go input are this design's own
// completion of the example. Because every state constant is written through
// enc_state(), a parity or one-hot variant of this module is the same case
// statement with re-encoded literals, and the check bits of the next state come
// out of the same logic.
module ex_fsm_next
  import ced_pkg::*;
#(
  parameter enc_e        ENC = ENC_BINARY,
  parameter int unsigned W   = state_w(ENC)
) (
  input  logic [W-1:0] ps,
  input  logic         reset,
  input  logic         go,
  output logic [W-1:0] ns
);

  localparam logic [W-1:0] C0 = W'(enc_state(ENC, S0));
  localparam logic [W-1:0] C1 = W'(enc_state(ENC, S1));
  localparam logic [W-1:0] C2 = W'(enc_state(ENC, S2));
  localparam logic [W-1:0] C3 = W'(enc_state(ENC, S3));

  always_comb begin
    if (reset) ns = C0;
    else begin
      case (ps)
        C0:      ns = C1;
        C1:      ns = go ? C2 : C1;
        C2:      ns = C3;
        C3:      ns = go ? C0 : C3;
        default: ns = C3;
      endcase
    end
  end

endmodule
