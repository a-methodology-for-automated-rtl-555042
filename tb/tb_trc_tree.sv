// tb_trc_tree: exhaustive test of the two-rail checker tree.
//
// Applies every combination of input pairs to trees of 4 (default), 3 and 1
// pairs, and checks that the output pair is a valid two-rail word exactly when
// every input pair is valid. Combinational; no clock.
module tb_trc_tree;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;

  logic [3:0][1:0] in4;
  logic [2:0][1:0] in3;
  logic [0:0][1:0] in1;
  logic [1:0]      z4, z3, z1;

  trc_tree                dut  (.in(in4), .z(z4));
  trc_tree #(.N(3))       dut3 (.in(in3), .z(z3));
  trc_tree #(.N(1))       dut1 (.in(in1), .z(z1));

  function automatic bit all_ok(logic [7:0] v, int n);
    for (int i = 0; i < n; i++) if (!tr_ok(v[2*i +: 2])) return 0;
    return 1;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 256; v++) begin
      in4 = 8'(v);
      in3 = 6'(v);
      in1 = 2'(v);
      #1;
      checks++;
      if (tr_ok(z4) != all_ok(8'(v), 4)) begin
        failures++;
        $display("FAIL N=4 in=%b z=%b", in4, z4);
      end
      if (v < 64) begin
        checks++;
        if (tr_ok(z3) != all_ok(8'(v), 3)) begin
          failures++;
          $display("FAIL N=3 in=%b z=%b", in3, z3);
        end
      end
      if (v < 4) begin
        checks++;
        if (z1 != 2'(v)) begin
          failures++;
          $display("FAIL N=1 in=%b z=%b", in1, z1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
