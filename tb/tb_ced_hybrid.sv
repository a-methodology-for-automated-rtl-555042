// tb_ced_hybrid: the example FSM under the hybrid parity scheme, fault-free and with
// injected single-bit errors.
//
// Phase 1: 1500 cycles of random go/sigY with occasional resets. Every cycle,
// just before the clock edge, the outputs are compared with the reference
// model and the two-rail error pair must be valid (no false alarm).
// Phase 2: 300 single-bit errors, one per cycle, each of a random kind and bit:
// state register bit, output bit, duplicate output bit.
// The bit is flipped by forcing the signal to its current value with one bit
// inverted; the error pair must show an error in the same cycle. Reset is held
// in that cycle so the FSM is back in S0 afterwards and the reference model
// stays in step. Every fault kind must have been injected and detected.
module tb_ced_hybrid;
  import ced_pkg::*;
  import tb_ref_pkg::*;

  localparam int NKIND = 3;
  localparam string KIND_NAME[NKIND] = '{"state register bit", "output bit", "duplicate output bit"};

  int checks = 0, failures = 0;
  int injected[NKIND], detected[NKIND];
  int false_alarms = 0;

  logic clk = 1'b0;
  logic reset, go, sigY;
  logic [3:0] y;
  logic [1:0] err;
  logic [2:0] f0_val;
  logic [3:0] f1_val;
  logic [3:0] f2_val;
  int s, kind, bitpos;

  ced_hybrid dut (.clk, .reset, .go, .sigY, .y, .err);

  always #5 clk = ~clk;

  task automatic detect(int k, int b);
    checks++;
    injected[k]++;
    if (!tr_ok(err)) detected[k]++;
    else begin
      failures++;
      $display("FAIL %s bit %0d not detected, err=%b t=%0t", KIND_NAME[k], b, err, $time);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; go = 1'b0; sigY = 1'b0;
    @(posedge clk);
    s = 0;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 49) == 0);
      go    = 1'($urandom);
      sigY  = 1'($urandom);
      #3;
      checks += 2;
      if (y !== ref_out(s, go, sigY)) begin
        failures++;
        $display("FAIL y=%b exp=%b s=%0d t=%0t", y, ref_out(s, go, sigY), s, $time);
      end
      if (!tr_ok(err)) begin
        failures++;
        false_alarms++;
        $display("FAIL false alarm err=%b s=%0d t=%0t", err, s, $time);
      end
      @(posedge clk);
      s = ref_next(s, reset, go);
    end
    for (int n = 0; n < 300; n++) begin
      // Walk a few fault-free cycles to reach a random state first.
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        reset = 1'b0;
        go    = 1'($urandom);
        sigY  = 1'($urandom);
        @(posedge clk);
        s = ref_next(s, reset, go);
      end
      @(negedge clk);
      reset = 1'b1;
      go    = 1'($urandom);
      sigY  = 1'($urandom);
      #1;
      kind = (n < NKIND) ? n : int'($urandom_range(0, NKIND - 1));
      case (kind)
        0: begin
          bitpos = $urandom_range(0, 2);
          f0_val = dut.u_fsm.ps ^ 3'(1 << bitpos);
          force dut.u_fsm.ps = f0_val;
          #2;
          detect(kind, bitpos);
          release dut.u_fsm.ps;
        end
        1: begin
          bitpos = $urandom_range(0, 3);
          f1_val = dut.y ^ 4'(1 << bitpos);
          force dut.y = f1_val;
          #2;
          detect(kind, bitpos);
          release dut.y;
        end
        2: begin
          bitpos = $urandom_range(0, 3);
          f2_val = dut.y_dup ^ 4'(1 << bitpos);
          force dut.y_dup = f2_val;
          #2;
          detect(kind, bitpos);
          release dut.y_dup;
        end
        default: ;
      endcase
      @(posedge clk);
      s = 0;
    end
    for (int k = 0; k < NKIND; k++) begin
      checks++;
      if (detected[k] == 0) begin
        failures++;
        $display("FAIL fault kind %s never detected", KIND_NAME[k]);
      end
      $display("%s: injected %0d detected %0d", KIND_NAME[k], injected[k], detected[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
