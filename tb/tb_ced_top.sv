// tb_ced_top: end-to-end test of the four-FSM control block.
//
// The four protected FSMs (parity, one-hot, hybrid parity, duplication) run on
// independent random go/sigY streams under a shared occasional reset.
// Phase 1 (2000 cycles): every output vector must match its own reference
// model, every per-FSM error pair and the global pair must be valid.
// Phase 2 (400 injections): one single-bit error per cycle in one FSM, chosen
// at random among its state register bits and its output bits. The error pair
// of that FSM and the global pair must show an error in the same cycle, and the
// other three FSMs' pairs must stay valid. Reset is held in the injection
// cycle so that all FSMs restart from S0 afterwards.
// Mechanisms counted (each must occur): every state of every FSM visited,
// reset, a detection by each scheme, the global two-rail error raised.
module tb_ced_top;
  import ced_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int visits[4][4];
  int detected[4];
  int n_reset = 0, n_global = 0;

  logic clk = 1'b0;
  logic reset;
  logic [3:0] go, sigY;
  logic [3:0][3:0] y;
  logic [3:0][1:0] err_fsm;
  logic [1:0] err;
  int s[4];
  int k, bitpos, is_state;

  logic [2:0] f_ps3;
  logic [3:0] f_ps4;
  logic [1:0] f_ps2;
  logic [3:0] f_y;

  ced_top dut (.clk, .reset, .go, .sigY, .y, .err_fsm, .err);

  always #5 clk = ~clk;

  task automatic fail(string msg);
    failures++;
    $display("FAIL %s t=%0t", msg, $time);
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    reset = 1'b1; go = '0; sigY = '0;
    @(posedge clk);
    s = '{0, 0, 0, 0};
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 49) == 0);
      go    = 4'($urandom);
      sigY  = 4'($urandom);
      #3;
      for (int i = 0; i < 4; i++) begin
        checks += 2;
        if (y[i] !== ref_out(s[i], go[i], sigY[i]))
          fail($sformatf("fsm %0d y=%b exp=%b", i, y[i], ref_out(s[i], go[i], sigY[i])));
        if (!tr_ok(err_fsm[i])) fail($sformatf("fsm %0d false alarm %b", i, err_fsm[i]));
        visits[i][s[i]]++;
      end
      checks++;
      if (!tr_ok(err)) fail($sformatf("global false alarm %b", err));
      if (reset) n_reset++;
      @(posedge clk);
      for (int i = 0; i < 4; i++) s[i] = ref_next(s[i], reset, go[i]);
    end

    for (int n = 0; n < 400; n++) begin
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        reset = 1'b0;
        go    = 4'($urandom);
        sigY  = 4'($urandom);
        @(posedge clk);
        for (int i = 0; i < 4; i++) s[i] = ref_next(s[i], reset, go[i]);
      end
      @(negedge clk);
      reset = 1'b1;
      go    = 4'($urandom);
      sigY  = 4'($urandom);
      #1;
      k = n % 4;
      is_state = int'($urandom_range(0, 1));
      if (is_state != 0) begin
        case (k)
          0: begin
            bitpos = $urandom_range(0, 2);
            f_ps3 = dut.u_parity.u_fsm.ps ^ 3'(1 << bitpos);
            force dut.u_parity.u_fsm.ps = f_ps3;
          end
          1: begin
            bitpos = $urandom_range(0, 3);
            f_ps4 = dut.u_onehot.u_fsm.ps ^ 4'(1 << bitpos);
            force dut.u_onehot.u_fsm.ps = f_ps4;
          end
          2: begin
            bitpos = $urandom_range(0, 2);
            f_ps3 = dut.u_hybrid.u_fsm.ps ^ 3'(1 << bitpos);
            force dut.u_hybrid.u_fsm.ps = f_ps3;
          end
          default: begin
            bitpos = $urandom_range(0, 1);
            f_ps2 = dut.u_dup.u_fsm_b.ps ^ 2'(1 << bitpos);
            force dut.u_dup.u_fsm_b.ps = f_ps2;
          end
        endcase
      end else begin
        bitpos = $urandom_range(0, 3);
        case (k)
          0: begin f_y = dut.u_parity.y ^ 4'(1 << bitpos); force dut.u_parity.y = f_y; end
          1: begin f_y = dut.u_onehot.y ^ 4'(1 << bitpos); force dut.u_onehot.y = f_y; end
          2: begin f_y = dut.u_hybrid.y ^ 4'(1 << bitpos); force dut.u_hybrid.y = f_y; end
          default: begin f_y = dut.u_dup.y ^ 4'(1 << bitpos); force dut.u_dup.y = f_y; end
        endcase
      end
      #2;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (i == k) begin
          if (!tr_ok(err_fsm[i])) detected[i]++;
          else fail($sformatf("fsm %0d %s bit %0d fault not detected", i,
                              is_state != 0 ? "state" : "output", bitpos));
        end else if (!tr_ok(err_fsm[i])) fail($sformatf("fsm %0d flagged for fault in fsm %0d", i, k));
      end
      checks++;
      if (!tr_ok(err)) n_global++;
      else fail("global error pair not raised");
      release dut.u_parity.u_fsm.ps;
      release dut.u_onehot.u_fsm.ps;
      release dut.u_hybrid.u_fsm.ps;
      release dut.u_dup.u_fsm_b.ps;
      release dut.u_parity.y;
      release dut.u_onehot.y;
      release dut.u_hybrid.y;
      release dut.u_dup.y;
      @(posedge clk);
      s = '{0, 0, 0, 0};
    end

    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (visits[i][j] == 0) fail($sformatf("fsm %0d never in state %0d", i, j));
      end
      checks++;
      if (detected[i] == 0) fail($sformatf("fsm %0d never detected a fault", i));
    end
    checks += 2;
    if (n_reset == 0) fail("reset never applied");
    if (n_global == 0) fail("global error never raised");
    $display("detections parity=%0d onehot=%0d hybrid=%0d dup=%0d global=%0d resets=%0d",
             detected[0], detected[1], detected[2], detected[3], n_global, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
