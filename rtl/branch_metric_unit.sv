// branch_metric_unit: Hamming-distance branch metric for one branch word.
//
// Two Feynman gates XOR the received symbol pair with the branch word
// (x0, x1) of the branch; a Peres gate used as a half adder counts the
// differing bits, giving a distance of 0, 1 or 2. The upper W-2 result bits
// are constant-zero lines, so the metric comes out at the path metric width
// and can go straight into the ACS adder.
// XOR gates, half adder and zero lines follow the original design; using
// Feynman gates for the XORs and a Peres gate for the half adder is this
// implementation's choice among reversible gates.
// Purely combinational, no clock.
module branch_metric_unit
  import conv_pkg::*;
#(
  parameter int unsigned W = PM_W
) (
  input  symbol_t      rx,      // received pair {first, second}
  input  symbol_t      word,    // branch word {x0, x1}
  output logic [W-1:0] bm
);
  logic d0, d1, sum, carry;
  logic p0_unused, p1_unused, p2_unused;

  feynman_gate u_x0 (.a(word[1]), .b(rx[1]), .p(p0_unused), .q(d0));
  feynman_gate u_x1 (.a(word[0]), .b(rx[0]), .p(p1_unused), .q(d1));
  // half adder
  peres_gate   u_ha (.a(d0), .b(d1), .c(1'b0), .p(p2_unused), .q(sum), .r(carry));

  assign bm = {{(W-2){1'b0}}, carry, sum};
endmodule
