// tb_ced_coverage: stuck-at fault coverage of the four CED schemes, measured
// with the three-observation-point method.
//
// Fault list: every bit of the signals listed below, stuck at 0 and at 1
// (130 faults). The signals are the next-state and state registers and the
// output vector of each protected FSM (its function logic), plus the
// redundant parts that exist only for checking: predicted parity, check bit,
// duplicate copies and checker rails.
//   parity : ns, ps, y | py, c, err
//   one-hot: ns, ps, y | py, z_state, z_out
//   hybrid : ns, ps, y | y_dup, z_state, z_out
//   dup    : copy A ns, ps, y | copy B ns, ps, y_b
// Each fault is applied with force for a whole run: reset, then 64 cycles of
// random go/sigY. Each FSM's outputs are compared with the reference model
// (functional observation point) and its two-rail error pair is watched
// (error observation point). Per scheme:
//   f1 = faults seen at the outputs or the error pair
//   f2 = faults seen at the outputs
//   f3 = faults seen at the error pair
//   coverage = (f3 - (f1 - f2)) / f2 = |f2 and f3| / |f2|
// Faults that reach only the error pair (f1 - f2) sit in the checking logic
// and are discounted. The checks: the run must give
//   - nonzero f2 for every scheme;
//   - 100% coverage for duplication;
//   - at least one discounted checker fault somewhere;
//   - no fault in the function logic of this small FSM may escape the parity,
//     one-hot or hybrid checks while corrupting an output, because every fault
//     here is a single-bit error;
//   - the fault-free circuit must never raise an error.
// Coverage is printed per scheme.
module tb_ced_coverage;
  import ced_pkg::*;
  import tb_ref_pkg::*;

  localparam int NF = 130;
  localparam int FSM_OF[NF] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 2, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3, 3};
  localparam bit IN_CHECK[NF] = '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1, 1};
  localparam string SCHEME[4] = '{"parity", "one-hot", "hybrid", "duplication"};

  int checks = 0, failures = 0;
  int f1[4], f2[4], f3[4], f23[4];

  logic clk = 1'b0;
  logic reset;
  logic [3:0] go, sigY;
  logic [3:0][3:0] y;
  logic [3:0][1:0] err_fsm;
  logic [1:0] err;

  ced_top dut (.clk, .reset, .go, .sigY, .y, .err_fsm, .err);

  always #5 clk = ~clk;

  task automatic apply_fault(int i);
    case (i)
      0: force dut.u_parity.u_fsm.ns[0] = 1'b0;
      1: force dut.u_parity.u_fsm.ns[0] = 1'b1;
      2: force dut.u_parity.u_fsm.ns[1] = 1'b0;
      3: force dut.u_parity.u_fsm.ns[1] = 1'b1;
      4: force dut.u_parity.u_fsm.ns[2] = 1'b0;
      5: force dut.u_parity.u_fsm.ns[2] = 1'b1;
      6: force dut.u_parity.u_fsm.ps[0] = 1'b0;
      7: force dut.u_parity.u_fsm.ps[0] = 1'b1;
      8: force dut.u_parity.u_fsm.ps[1] = 1'b0;
      9: force dut.u_parity.u_fsm.ps[1] = 1'b1;
      10: force dut.u_parity.u_fsm.ps[2] = 1'b0;
      11: force dut.u_parity.u_fsm.ps[2] = 1'b1;
      12: force dut.u_parity.y[0] = 1'b0;
      13: force dut.u_parity.y[0] = 1'b1;
      14: force dut.u_parity.y[1] = 1'b0;
      15: force dut.u_parity.y[1] = 1'b1;
      16: force dut.u_parity.y[2] = 1'b0;
      17: force dut.u_parity.y[2] = 1'b1;
      18: force dut.u_parity.y[3] = 1'b0;
      19: force dut.u_parity.y[3] = 1'b1;
      20: force dut.u_parity.py = 1'b0;
      21: force dut.u_parity.py = 1'b1;
      22: force dut.u_parity.c = 1'b0;
      23: force dut.u_parity.c = 1'b1;
      24: force dut.u_parity.err[0] = 1'b0;
      25: force dut.u_parity.err[0] = 1'b1;
      26: force dut.u_parity.err[1] = 1'b0;
      27: force dut.u_parity.err[1] = 1'b1;
      28: force dut.u_onehot.u_fsm.ns[0] = 1'b0;
      29: force dut.u_onehot.u_fsm.ns[0] = 1'b1;
      30: force dut.u_onehot.u_fsm.ns[1] = 1'b0;
      31: force dut.u_onehot.u_fsm.ns[1] = 1'b1;
      32: force dut.u_onehot.u_fsm.ns[2] = 1'b0;
      33: force dut.u_onehot.u_fsm.ns[2] = 1'b1;
      34: force dut.u_onehot.u_fsm.ns[3] = 1'b0;
      35: force dut.u_onehot.u_fsm.ns[3] = 1'b1;
      36: force dut.u_onehot.u_fsm.ps[0] = 1'b0;
      37: force dut.u_onehot.u_fsm.ps[0] = 1'b1;
      38: force dut.u_onehot.u_fsm.ps[1] = 1'b0;
      39: force dut.u_onehot.u_fsm.ps[1] = 1'b1;
      40: force dut.u_onehot.u_fsm.ps[2] = 1'b0;
      41: force dut.u_onehot.u_fsm.ps[2] = 1'b1;
      42: force dut.u_onehot.u_fsm.ps[3] = 1'b0;
      43: force dut.u_onehot.u_fsm.ps[3] = 1'b1;
      44: force dut.u_onehot.y[0] = 1'b0;
      45: force dut.u_onehot.y[0] = 1'b1;
      46: force dut.u_onehot.y[1] = 1'b0;
      47: force dut.u_onehot.y[1] = 1'b1;
      48: force dut.u_onehot.y[2] = 1'b0;
      49: force dut.u_onehot.y[2] = 1'b1;
      50: force dut.u_onehot.y[3] = 1'b0;
      51: force dut.u_onehot.y[3] = 1'b1;
      52: force dut.u_onehot.py = 1'b0;
      53: force dut.u_onehot.py = 1'b1;
      54: force dut.u_onehot.z_state[0] = 1'b0;
      55: force dut.u_onehot.z_state[0] = 1'b1;
      56: force dut.u_onehot.z_state[1] = 1'b0;
      57: force dut.u_onehot.z_state[1] = 1'b1;
      58: force dut.u_onehot.z_out[0] = 1'b0;
      59: force dut.u_onehot.z_out[0] = 1'b1;
      60: force dut.u_onehot.z_out[1] = 1'b0;
      61: force dut.u_onehot.z_out[1] = 1'b1;
      62: force dut.u_hybrid.u_fsm.ns[0] = 1'b0;
      63: force dut.u_hybrid.u_fsm.ns[0] = 1'b1;
      64: force dut.u_hybrid.u_fsm.ns[1] = 1'b0;
      65: force dut.u_hybrid.u_fsm.ns[1] = 1'b1;
      66: force dut.u_hybrid.u_fsm.ns[2] = 1'b0;
      67: force dut.u_hybrid.u_fsm.ns[2] = 1'b1;
      68: force dut.u_hybrid.u_fsm.ps[0] = 1'b0;
      69: force dut.u_hybrid.u_fsm.ps[0] = 1'b1;
      70: force dut.u_hybrid.u_fsm.ps[1] = 1'b0;
      71: force dut.u_hybrid.u_fsm.ps[1] = 1'b1;
      72: force dut.u_hybrid.u_fsm.ps[2] = 1'b0;
      73: force dut.u_hybrid.u_fsm.ps[2] = 1'b1;
      74: force dut.u_hybrid.y[0] = 1'b0;
      75: force dut.u_hybrid.y[0] = 1'b1;
      76: force dut.u_hybrid.y[1] = 1'b0;
      77: force dut.u_hybrid.y[1] = 1'b1;
      78: force dut.u_hybrid.y[2] = 1'b0;
      79: force dut.u_hybrid.y[2] = 1'b1;
      80: force dut.u_hybrid.y[3] = 1'b0;
      81: force dut.u_hybrid.y[3] = 1'b1;
      82: force dut.u_hybrid.y_dup[0] = 1'b0;
      83: force dut.u_hybrid.y_dup[0] = 1'b1;
      84: force dut.u_hybrid.y_dup[1] = 1'b0;
      85: force dut.u_hybrid.y_dup[1] = 1'b1;
      86: force dut.u_hybrid.y_dup[2] = 1'b0;
      87: force dut.u_hybrid.y_dup[2] = 1'b1;
      88: force dut.u_hybrid.y_dup[3] = 1'b0;
      89: force dut.u_hybrid.y_dup[3] = 1'b1;
      90: force dut.u_hybrid.z_state[0] = 1'b0;
      91: force dut.u_hybrid.z_state[0] = 1'b1;
      92: force dut.u_hybrid.z_state[1] = 1'b0;
      93: force dut.u_hybrid.z_state[1] = 1'b1;
      94: force dut.u_hybrid.z_out[0] = 1'b0;
      95: force dut.u_hybrid.z_out[0] = 1'b1;
      96: force dut.u_hybrid.z_out[1] = 1'b0;
      97: force dut.u_hybrid.z_out[1] = 1'b1;
      98: force dut.u_dup.u_fsm_a.ns[0] = 1'b0;
      99: force dut.u_dup.u_fsm_a.ns[0] = 1'b1;
      100: force dut.u_dup.u_fsm_a.ns[1] = 1'b0;
      101: force dut.u_dup.u_fsm_a.ns[1] = 1'b1;
      102: force dut.u_dup.u_fsm_a.ps[0] = 1'b0;
      103: force dut.u_dup.u_fsm_a.ps[0] = 1'b1;
      104: force dut.u_dup.u_fsm_a.ps[1] = 1'b0;
      105: force dut.u_dup.u_fsm_a.ps[1] = 1'b1;
      106: force dut.u_dup.y[0] = 1'b0;
      107: force dut.u_dup.y[0] = 1'b1;
      108: force dut.u_dup.y[1] = 1'b0;
      109: force dut.u_dup.y[1] = 1'b1;
      110: force dut.u_dup.y[2] = 1'b0;
      111: force dut.u_dup.y[2] = 1'b1;
      112: force dut.u_dup.y[3] = 1'b0;
      113: force dut.u_dup.y[3] = 1'b1;
      114: force dut.u_dup.u_fsm_b.ns[0] = 1'b0;
      115: force dut.u_dup.u_fsm_b.ns[0] = 1'b1;
      116: force dut.u_dup.u_fsm_b.ns[1] = 1'b0;
      117: force dut.u_dup.u_fsm_b.ns[1] = 1'b1;
      118: force dut.u_dup.u_fsm_b.ps[0] = 1'b0;
      119: force dut.u_dup.u_fsm_b.ps[0] = 1'b1;
      120: force dut.u_dup.u_fsm_b.ps[1] = 1'b0;
      121: force dut.u_dup.u_fsm_b.ps[1] = 1'b1;
      122: force dut.u_dup.y_b[0] = 1'b0;
      123: force dut.u_dup.y_b[0] = 1'b1;
      124: force dut.u_dup.y_b[1] = 1'b0;
      125: force dut.u_dup.y_b[1] = 1'b1;
      126: force dut.u_dup.y_b[2] = 1'b0;
      127: force dut.u_dup.y_b[2] = 1'b1;
      128: force dut.u_dup.y_b[3] = 1'b0;
      129: force dut.u_dup.y_b[3] = 1'b1;
      default: ;
    endcase
  endtask

  task automatic remove_fault(int i);
    case (i)
      0: release dut.u_parity.u_fsm.ns[0];
      1: release dut.u_parity.u_fsm.ns[0];
      2: release dut.u_parity.u_fsm.ns[1];
      3: release dut.u_parity.u_fsm.ns[1];
      4: release dut.u_parity.u_fsm.ns[2];
      5: release dut.u_parity.u_fsm.ns[2];
      6: release dut.u_parity.u_fsm.ps[0];
      7: release dut.u_parity.u_fsm.ps[0];
      8: release dut.u_parity.u_fsm.ps[1];
      9: release dut.u_parity.u_fsm.ps[1];
      10: release dut.u_parity.u_fsm.ps[2];
      11: release dut.u_parity.u_fsm.ps[2];
      12: release dut.u_parity.y[0];
      13: release dut.u_parity.y[0];
      14: release dut.u_parity.y[1];
      15: release dut.u_parity.y[1];
      16: release dut.u_parity.y[2];
      17: release dut.u_parity.y[2];
      18: release dut.u_parity.y[3];
      19: release dut.u_parity.y[3];
      20: release dut.u_parity.py;
      21: release dut.u_parity.py;
      22: release dut.u_parity.c;
      23: release dut.u_parity.c;
      24: release dut.u_parity.err[0];
      25: release dut.u_parity.err[0];
      26: release dut.u_parity.err[1];
      27: release dut.u_parity.err[1];
      28: release dut.u_onehot.u_fsm.ns[0];
      29: release dut.u_onehot.u_fsm.ns[0];
      30: release dut.u_onehot.u_fsm.ns[1];
      31: release dut.u_onehot.u_fsm.ns[1];
      32: release dut.u_onehot.u_fsm.ns[2];
      33: release dut.u_onehot.u_fsm.ns[2];
      34: release dut.u_onehot.u_fsm.ns[3];
      35: release dut.u_onehot.u_fsm.ns[3];
      36: release dut.u_onehot.u_fsm.ps[0];
      37: release dut.u_onehot.u_fsm.ps[0];
      38: release dut.u_onehot.u_fsm.ps[1];
      39: release dut.u_onehot.u_fsm.ps[1];
      40: release dut.u_onehot.u_fsm.ps[2];
      41: release dut.u_onehot.u_fsm.ps[2];
      42: release dut.u_onehot.u_fsm.ps[3];
      43: release dut.u_onehot.u_fsm.ps[3];
      44: release dut.u_onehot.y[0];
      45: release dut.u_onehot.y[0];
      46: release dut.u_onehot.y[1];
      47: release dut.u_onehot.y[1];
      48: release dut.u_onehot.y[2];
      49: release dut.u_onehot.y[2];
      50: release dut.u_onehot.y[3];
      51: release dut.u_onehot.y[3];
      52: release dut.u_onehot.py;
      53: release dut.u_onehot.py;
      54: release dut.u_onehot.z_state[0];
      55: release dut.u_onehot.z_state[0];
      56: release dut.u_onehot.z_state[1];
      57: release dut.u_onehot.z_state[1];
      58: release dut.u_onehot.z_out[0];
      59: release dut.u_onehot.z_out[0];
      60: release dut.u_onehot.z_out[1];
      61: release dut.u_onehot.z_out[1];
      62: release dut.u_hybrid.u_fsm.ns[0];
      63: release dut.u_hybrid.u_fsm.ns[0];
      64: release dut.u_hybrid.u_fsm.ns[1];
      65: release dut.u_hybrid.u_fsm.ns[1];
      66: release dut.u_hybrid.u_fsm.ns[2];
      67: release dut.u_hybrid.u_fsm.ns[2];
      68: release dut.u_hybrid.u_fsm.ps[0];
      69: release dut.u_hybrid.u_fsm.ps[0];
      70: release dut.u_hybrid.u_fsm.ps[1];
      71: release dut.u_hybrid.u_fsm.ps[1];
      72: release dut.u_hybrid.u_fsm.ps[2];
      73: release dut.u_hybrid.u_fsm.ps[2];
      74: release dut.u_hybrid.y[0];
      75: release dut.u_hybrid.y[0];
      76: release dut.u_hybrid.y[1];
      77: release dut.u_hybrid.y[1];
      78: release dut.u_hybrid.y[2];
      79: release dut.u_hybrid.y[2];
      80: release dut.u_hybrid.y[3];
      81: release dut.u_hybrid.y[3];
      82: release dut.u_hybrid.y_dup[0];
      83: release dut.u_hybrid.y_dup[0];
      84: release dut.u_hybrid.y_dup[1];
      85: release dut.u_hybrid.y_dup[1];
      86: release dut.u_hybrid.y_dup[2];
      87: release dut.u_hybrid.y_dup[2];
      88: release dut.u_hybrid.y_dup[3];
      89: release dut.u_hybrid.y_dup[3];
      90: release dut.u_hybrid.z_state[0];
      91: release dut.u_hybrid.z_state[0];
      92: release dut.u_hybrid.z_state[1];
      93: release dut.u_hybrid.z_state[1];
      94: release dut.u_hybrid.z_out[0];
      95: release dut.u_hybrid.z_out[0];
      96: release dut.u_hybrid.z_out[1];
      97: release dut.u_hybrid.z_out[1];
      98: release dut.u_dup.u_fsm_a.ns[0];
      99: release dut.u_dup.u_fsm_a.ns[0];
      100: release dut.u_dup.u_fsm_a.ns[1];
      101: release dut.u_dup.u_fsm_a.ns[1];
      102: release dut.u_dup.u_fsm_a.ps[0];
      103: release dut.u_dup.u_fsm_a.ps[0];
      104: release dut.u_dup.u_fsm_a.ps[1];
      105: release dut.u_dup.u_fsm_a.ps[1];
      106: release dut.u_dup.y[0];
      107: release dut.u_dup.y[0];
      108: release dut.u_dup.y[1];
      109: release dut.u_dup.y[1];
      110: release dut.u_dup.y[2];
      111: release dut.u_dup.y[2];
      112: release dut.u_dup.y[3];
      113: release dut.u_dup.y[3];
      114: release dut.u_dup.u_fsm_b.ns[0];
      115: release dut.u_dup.u_fsm_b.ns[0];
      116: release dut.u_dup.u_fsm_b.ns[1];
      117: release dut.u_dup.u_fsm_b.ns[1];
      118: release dut.u_dup.u_fsm_b.ps[0];
      119: release dut.u_dup.u_fsm_b.ps[0];
      120: release dut.u_dup.u_fsm_b.ps[1];
      121: release dut.u_dup.u_fsm_b.ps[1];
      122: release dut.u_dup.y_b[0];
      123: release dut.u_dup.y_b[0];
      124: release dut.u_dup.y_b[1];
      125: release dut.u_dup.y_b[1];
      126: release dut.u_dup.y_b[2];
      127: release dut.u_dup.y_b[2];
      128: release dut.u_dup.y_b[3];
      129: release dut.u_dup.y_b[3];
      default: ;
    endcase
  endtask

  // One run: reset, then 64 random cycles. Returns what was seen on FSM k.
  task automatic run(int k, int seed, output bit seen_out, output bit seen_err);
    int s;
    int unsigned r;
    seen_out = 0;
    seen_err = 0;
    r = $urandom(seed);
    @(negedge clk);
    reset = 1'b1;
    go = '0;
    sigY = '0;
    @(posedge clk);
    s = 0;
    for (int c = 0; c < 64; c++) begin
      @(negedge clk);
      reset = 1'b0;
      go    = 4'($urandom);
      sigY  = 4'($urandom);
      #3;
      if (y[k] !== ref_out(s, go[k], sigY[k])) seen_out = 1;
      if (!tr_ok(err_fsm[k])) seen_err = 1;
      @(posedge clk);
      s = ref_next(s, reset, go[k]);
    end
  endtask

  initial begin
    repeat (NF * 70 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit so, se;
    int k;
    int discounted = 0;
    reset = 1'b1; go = '0; sigY = '0;
    // Fault-free reference run of every FSM.
    for (int j = 0; j < 4; j++) begin
      run(j, 17, so, se);
      checks++;
      if (so || se) begin
        failures++;
        $display("FAIL fault-free %s: out mismatch %0b, error %0b", SCHEME[j], so, se);
      end
    end
    for (int i = 0; i < NF; i++) begin
      k = FSM_OF[i];
      apply_fault(i);
      run(k, 17 + i, so, se);
      remove_fault(i);
      if (so || se) f1[k]++;
      if (so) f2[k]++;
      if (se) f3[k]++;
      if (so && se) f23[k]++;
      if (se && !so) discounted++;
      if (so && !se && k != 3 && !IN_CHECK[i]) begin
        checks++;
        failures++;
        $display("FAIL %s: single-bit fault %0d corrupts outputs undetected", SCHEME[k], i);
      end
    end
    for (int j = 0; j < 4; j++) begin
      checks++;
      if (f2[j] == 0) begin failures++; $display("FAIL %s: no fault reached the outputs", SCHEME[j]); end
      // (f3 - (f1 - f2)) counted directly as faults seen at both points.
      checks++;
      if (f3[j] - (f1[j] - f2[j]) != f23[j]) begin
        failures++; $display("FAIL %s: set arithmetic", SCHEME[j]);
      end
      $display("%-11s f1=%0d f2=%0d f3=%0d coverage=%0d/%0d = %0.1f%%", SCHEME[j],
               f1[j], f2[j], f3[j], f23[j], f2[j], 100.0 * f23[j] / (f2[j] > 0 ? f2[j] : 1));
    end
    checks++;
    if (f23[3] != f2[3]) begin failures++; $display("FAIL duplication coverage below 100%%"); end
    checks++;
    if (discounted == 0) begin failures++; $display("FAIL no checker-only fault seen"); end
    $display("faults=%0d checker-only (discounted)=%0d", NF, discounted);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
