// ex_fsm_out: output logic of the example control FSM.
//
// Combinational (Mealy). Decodes the present state ps, written in the code
// selected by ENC, with equality compares against re-encoded state constants,
// and forms the output vector (bit positions in ced_pkg):
//   sigX = sigY & (ps == S2)   -- the output given in the document's example
//   ld   = go & (ps == S1)     -- this design's own addition
//   busy = (ps != S0)          -- this design's own addition
//   done = (ps == S3)          -- this design's own addition
// The extra outputs give the output parity checks of the CED schemes more than
// one bit to work on. The hybrid scheme instantiates this module twice.
module ex_fsm_out
  import ced_pkg::*;
#(
  parameter enc_e        ENC = ENC_BINARY,
  parameter int unsigned W   = state_w(ENC)
) (
  input  logic [W-1:0]    ps,
  input  logic            go,
  input  logic            sigY,
  output logic [NOUT-1:0] y
);

  localparam logic [W-1:0] C0 = W'(enc_state(ENC, S0));
  localparam logic [W-1:0] C1 = W'(enc_state(ENC, S1));
  localparam logic [W-1:0] C2 = W'(enc_state(ENC, S2));
  localparam logic [W-1:0] C3 = W'(enc_state(ENC, S3));

  always_comb begin
    y         = '0;
    y[O_SIGX] = sigY & (ps == C2);
    y[O_LD]   = go & (ps == C1);
    y[O_BUSY] = (ps != C0);
    y[O_DONE] = (ps == C3);
  end

endmodule
