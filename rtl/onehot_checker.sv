// onehot_checker: 1-out-of-W checker with two-rail output.
//
// Combinational. Splits the state word d into a low group A = d[W/2-1:0] and a
// high group B and forms
//   z[0] = OR(A) | (at least two ones in B)
//   z[1] = OR(B) | (at least two ones in A)
// Exactly one 1 anywhere gives z = 01 or 10 (valid). All zeros gives 00; two or
// more ones, in one group or spread over both, gives 11. So every non-one-hot
// word is flagged. The document asks for a self-testing one-hot checker without
// giving its circuit; this two-group construction is this design's own.
// W must be at least 2.
module onehot_checker
  import ced_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] d,
  output tworail_t     z
);

  localparam int unsigned H = W / 2;

  logic any_a, any_b, two_a, two_b;

  // OR of a group and "at least two ones" of a group, by a running scan.
  always_comb begin
    any_a = 1'b0;
    two_a = 1'b0;
    for (int unsigned i = 0; i < H; i++) begin
      two_a = two_a | (any_a & d[i]);
      any_a = any_a | d[i];
    end
    any_b = 1'b0;
    two_b = 1'b0;
    for (int unsigned i = H; i < W; i++) begin
      two_b = two_b | (any_b & d[i]);
      any_b = any_b | d[i];
    end
  end

  assign z[0] = any_a | two_b;
  assign z[1] = any_b | two_a;

  initial assert (W >= 2) else $error("onehot_checker: W must be at least 2");

endmodule
