// tb_parity_checker: exhaustive test of the two-rail parity checker.
//
// Drives every word into an 8-bit odd-parity checker (the default) and a 5-bit
// even-parity checker, and checks that the output pair is valid exactly when
// the word has the expected parity (counted bit by bit here).
module tb_parity_checker;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [7:0] d8;
  logic [4:0] d5;
  logic [1:0] z8, z5;

  parity_checker                      dut  (.d(d8), .z(z8));
  parity_checker #(.W(5), .ODD(1'b0)) dut5 (.d(d5), .z(z5));

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
    for (int v = 0; v < 256; v++) begin
      d8 = 8'(v);
      d5 = 5'(v);
      #1;
      checks++;
      if (tr_ok(z8) != (ones(v, 8) % 2 == 1)) begin
        failures++;
        $display("FAIL odd W=8 d=%b z=%b", d8, z8);
      end
      if (v < 32) begin
        checks++;
        if (tr_ok(z5) != (ones(v, 5) % 2 == 0)) begin
          failures++;
          $display("FAIL even W=5 d=%b z=%b", d5, z5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
