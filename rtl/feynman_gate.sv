// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//
// Input a is the control line and passes straight through to p; the target
// line b is inverted when a is 1, so q = a ^ b. The mapping is one-to-one, so
// (a, b) can always be recovered from (p, q). In the design it serves as a
// reversible XOR (encoder, branch metric unit, flag decoder) and, with b tied
// to a constant, as a buffer (b = 0) or an inverter (b = 1).
// Purely combinational, no clock.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
