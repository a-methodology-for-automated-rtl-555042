// tb_ref_pkg: reference model of the example FSM for the testbenches.
//
// Written directly from the state table, on plain integers, with no use of the
// design's encoding functions: next state, output vector {sigX, ld, busy,
// done} and the XOR of that vector.
package tb_ref_pkg;

  function automatic int ref_next(int s, bit reset, bit go);
    if (reset) return 0;
    case (s)
      0:       return 1;
      1:       return go ? 2 : 1;
      2:       return 3;
      3:       return go ? 0 : 3;
      default: return 3;
    endcase
  endfunction

  // Bit 3 sigX, bit 2 ld, bit 1 busy, bit 0 done.
  function automatic logic [3:0] ref_out(int s, bit go, bit sigY);
    logic [3:0] y;
    y[3] = sigY && (s == 2);
    y[2] = go && (s == 1);
    y[1] = (s != 0);
    y[0] = (s == 3);
    return y;
  endfunction

  function automatic bit ref_par(int s, bit go, bit sigY);
    logic [3:0] y;
    y = ref_out(s, go, sigY);
    return y[0] ^ y[1] ^ y[2] ^ y[3];
  endfunction

  // Two-rail pair is a code word when the rails differ.
  function automatic bit tr_ok(logic [1:0] z);
    return z == 2'b01 || z == 2'b10;
  endfunction

endpackage
