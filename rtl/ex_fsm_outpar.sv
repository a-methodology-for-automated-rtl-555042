// ex_fsm_outpar: check symbol generator (output parity predictor) of the
// example FSM.
//
// Combinational. Computes, straight from the present state and the inputs and
// without looking at the output logic, the parity (XOR) the output vector of
// ex_fsm_out should have:
//   S1 : busy=1, ld=go     -> parity = ~go
//   S2 : busy=1, sigX=sigY -> parity = ~sigY
//   S0 : all outputs 0     -> parity = 0
//   S3 : busy=1, done=1    -> parity = 0
//   any illegal code       -> 1 (the output logic then drives busy only, so
//                             the prediction agrees with it and a corrupted
//                             state shows up in the state check alone)
// It is the k = 1 check symbol generator of the systematic-code CED structure;
// that outputs are checked through predicted parity follows the document, the
// table above is derived from this design's own output logic.
module ex_fsm_outpar
  import ced_pkg::*;
#(
  parameter enc_e        ENC = ENC_BINARY,
  parameter int unsigned W   = state_w(ENC)
) (
  input  logic [W-1:0] ps,
  input  logic         go,
  input  logic         sigY,
  output logic         py
);

  localparam logic [W-1:0] C0 = W'(enc_state(ENC, S0));
  localparam logic [W-1:0] C1 = W'(enc_state(ENC, S1));
  localparam logic [W-1:0] C2 = W'(enc_state(ENC, S2));
  localparam logic [W-1:0] C3 = W'(enc_state(ENC, S3));

  always_comb begin
    case (ps)
      C1:      py = ~go;
      C2:      py = ~sigY;
      C0:      py = 1'b0;
      C3:      py = 1'b0;
      default: py = 1'b1;
    endcase
  end

endmodule
