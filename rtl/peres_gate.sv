// peres_gate: the 3x3 reversible Peres gate.
//
// p = a, q = a ^ b, r = (a & b) ^ c. It equals a Toffoli gate followed by a
// Feynman gate on the first two lines. With c = 0 it is a half adder
// (q = sum, r = carry); two of them make a full adder.
// Purely combinational, no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
