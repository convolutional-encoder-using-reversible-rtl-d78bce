// fredkin_gate: the 3x3 reversible Fredkin (controlled swap) gate.
//
// The control a passes through to p. When a is 0, q = b and r = c; when a is 1
// the two data lines are swapped, q = c and r = b. In equation form
// q = ~a&b | a&c and r = ~a&c | a&b. Output q is a 2:1 multiplexer with select
// a; with c tied to 1, q = a | b, a reversible OR.
// Purely combinational, no clock.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
