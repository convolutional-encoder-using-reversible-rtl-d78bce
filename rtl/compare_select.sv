// compare_select: compare-and-select unit of the Viterbi decoder.
//
// Takes two candidate path metrics arriving at one trellis state, pm_j and
// pm_jn, and passes on the smaller. A W-bit comparator forms the decision
// c = (pm_j > pm_jn) and a Fredkin multiplexer selects pm_j when c = 0 and
// pm_jn when c = 1; on a tie pm_j wins. The decision bit is brought out, since
// the trace back unit needs it.
// The comparator-plus-Fredkin-multiplexer structure and the meaning of c
// follow the original design; which way a tie goes is not specified there and
// is this implementation's choice.
// Purely combinational, no clock.
module compare_select #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] pm_j,
  input  logic [W-1:0] pm_jn,
  output logic [W-1:0] pm_min,
  output logic         c
);
  logic eq_unused, lt_unused;

  magnitude_comparator #(.W(W)) u_cmp (
    .a(pm_j), .b(pm_jn), .a_gt(c), .a_eq(eq_unused), .a_lt(lt_unused)
  );
  fredkin_mux #(.W(W)) u_mux (.sel(c), .i1(pm_j), .i2(pm_jn), .y(pm_min));
endmodule
