// tb_ex_fsm: the example FSM in its three state codes against the reference
// model.
//
// Three instances (binary, parity, one-hot) run on the same random go/sigY
// stream with occasional resets. Every cycle, just before the clock edge, the
// outputs are compared with the reference model and the state register with
// the code word worked out here (binary s; parity: odd-parity bit then s;
// one-hot: bit s set). Each state must be visited and reset must be seen.
// Finally each instance's state register is forced to a code that is no state
// (where one exists) and must go to S3 (the default branch) on the next edge.
module tb_ex_fsm;
  import ced_pkg::*;
  import tb_ref_pkg::*;

  int checks = 0, failures = 0;
  int visits[4];
  int n_reset = 0, n_default = 0;

  logic clk = 1'b0;
  logic reset, go, sigY;
  logic [3:0] yb, yp, yo;
  logic [1:0] psb;
  logic [2:0] psp;
  logic [3:0] pso;
  logic [2:0] tmp3;
  logic [3:0] tmp4;
  int s;

  ex_fsm #(.ENC(ENC_BINARY)) dut  (.clk, .reset, .go, .sigY, .y(yb), .ps(psb));
  ex_fsm #(.ENC(ENC_PARITY)) dutp (.clk, .reset, .go, .sigY, .y(yp), .ps(psp));
  ex_fsm #(.ENC(ENC_ONEHOT)) duto (.clk, .reset, .go, .sigY, .y(yo), .ps(pso));

  always #5 clk = ~clk;

  function automatic logic [2:0] par_code(int st);
    logic [1:0] b = 2'(st);
    return {~(b[0] ^ b[1]), b};
  endfunction

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s t=%0t s=%0d got=%b exp=%b", what, $time, s, got, exp);
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
    for (int cyc = 0; cyc < 2000; cyc++) begin
      @(negedge clk);
      reset = ($urandom_range(0, 49) == 0);
      go    = 1'($urandom);
      sigY  = 1'($urandom);
      #3;
      check("bin y", yb, ref_out(s, go, sigY));
      check("par y", yp, ref_out(s, go, sigY));
      check("oh  y", yo, ref_out(s, go, sigY));
      check("bin ps", {2'b00, psb}, 4'(s));
      check("par ps", {1'b0, psp}, {1'b0, par_code(s)});
      check("oh  ps", pso, 4'(1 << s));
      visits[s]++;
      if (reset) n_reset++;
      @(posedge clk);
      s = ref_next(s, reset, go);
    end
    // Default branch: an illegal code goes to S3.
    @(negedge clk);
    reset = 1'b0;
    tmp3 = 3'b000;          // even parity: not a state
    tmp4 = 4'b0110;         // two ones: not a state
    force dutp.ps = tmp3;
    force duto.ps = tmp4;
    @(posedge clk);
    release dutp.ps;
    release duto.ps;
    #1;
    checks += 2;
    if (psp === par_code(3)) n_default++; else begin
      failures++; $display("FAIL parity default branch ps=%b", psp);
    end
    if (pso === 4'b1000) n_default++; else begin
      failures++; $display("FAIL one-hot default branch ps=%b", pso);
    end
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (visits[i] == 0) begin failures++; $display("FAIL state %0d never visited", i); end
    end
    checks++;
    if (n_reset == 0) begin failures++; $display("FAIL reset never applied"); end
    $display("visits S0..S3 = %0d %0d %0d %0d, resets %0d, default branch %0d",
             visits[0], visits[1], visits[2], visits[3], n_reset, n_default);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
