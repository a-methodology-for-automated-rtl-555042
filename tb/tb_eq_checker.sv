// tb_eq_checker: exhaustive test of the two-rail equality checker.
//
// Drives every pair of 4-bit words (the default width) and checks that the
// output pair is valid exactly when the words are equal.
module tb_eq_checker;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0] a, b;
  logic [1:0] z;

  eq_checker dut (.a(a), .b(b), .z(z));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i);
        b = 4'(j);
        #1;
        checks++;
        if (tr_ok(z) != (i == j)) begin
          failures++;
          $display("FAIL a=%b b=%b z=%b", a, b, z);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
