// tb_ex_fsm_outpar: the output parity predictor against the reference model.
//
// For the binary, parity and one-hot codes, drives every state code word with
// every go/sigY combination and checks the prediction against the XOR of the
// reference outputs. For the parity and one-hot codes it also drives every word
// that is no state and expects 1 (the parity of the output logic's busy-only
// response to such a word).
module tb_ex_fsm_outpar;
  import ced_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [1:0] psb;
  logic [2:0] psp;
  logic [3:0] pso;
  logic go, sigY;
  logic pyb, pyp, pyo;

  ex_fsm_outpar                    dut  (.ps(psb), .go, .sigY, .py(pyb));
  ex_fsm_outpar #(.ENC(ENC_PARITY)) dutp (.ps(psp), .go, .sigY, .py(pyp));
  ex_fsm_outpar #(.ENC(ENC_ONEHOT)) duto (.ps(pso), .go, .sigY, .py(pyo));

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s psb=%b psp=%b pso=%b go=%b sigY=%b got=%b exp=%b",
               what, psb, psp, pso, go, sigY, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int in = 0; in < 4; in++) begin
      go = in[0];
      sigY = in[1];
      for (int s = 0; s < 4; s++) begin
        psb = 2'(s);
        psp = {~(psb[0] ^ psb[1]), psb};
        pso = 4'(1 << s);
        #1;
        check("bin", pyb, ref_par(s, go, sigY));
        check("par", pyp, ref_par(s, go, sigY));
        check("oh", pyo, ref_par(s, go, sigY));
      end
      for (int v = 0; v < 8; v++) begin
        psp = 3'(v);
        #1;
        if ((psp[0] ^ psp[1] ^ psp[2]) == 1'b0) check("par illegal", pyp, 1'b1);
      end
      for (int v = 0; v < 16; v++) begin
        pso = 4'(v);
        #1;
        if (!$onehot(pso)) check("oh illegal", pyo, 1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
