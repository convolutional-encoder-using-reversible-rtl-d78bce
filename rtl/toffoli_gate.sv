// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// Lines a and b are controls and pass through unchanged; the target line c is
// inverted when both controls are 1: r = (a & b) ^ c. With c tied to 0 the gate
// is a reversible AND, which is how the trace back cells use it.
// Purely combinational, no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
