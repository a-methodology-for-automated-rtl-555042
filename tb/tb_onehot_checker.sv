// tb_onehot_checker: exhaustive test of the 1-out-of-W checker.
//
// Drives every word into checkers of width 4 (default), 5 and 2 and checks that
// the output pair is valid exactly when the word has a single 1.
module tb_onehot_checker;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] d4;
  logic [4:0] d5;
  logic [1:0] d2;
  logic [1:0] z4, z5, z2;

  onehot_checker            dut  (.d(d4), .z(z4));
  onehot_checker #(.W(5))   dut5 (.d(d5), .z(z5));
  onehot_checker #(.W(2))   dut2 (.d(d2), .z(z2));

  function automatic int ones(int v, int n);
    int c = 0;
    for (int i = 0; i < n; i++) c += (v >> i) & 1;
    return c;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      d4 = 4'(v);
      d5 = 5'(v);
      d2 = 2'(v);
      #1;
      checks++;
      if (tr_ok(z5) != (ones(v, 5) == 1)) begin
        failures++;
        $display("FAIL W=5 d=%b z=%b", d5, z5);
      end
      if (v < 16) begin
        checks++;
        if (tr_ok(z4) != (ones(v, 4) == 1)) begin
          failures++;
          $display("FAIL W=4 d=%b z=%b", d4, z4);
        end
      end
      if (v < 4) begin
        checks++;
        if (tr_ok(z2) != (ones(v, 2) == 1)) begin
          failures++;
          $display("FAIL W=2 d=%b z=%b", d2, z2);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
