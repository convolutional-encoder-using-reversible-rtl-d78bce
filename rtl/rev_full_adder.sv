// rev_full_adder: one-bit full adder made of two Peres gates.
//
// The first Peres gate takes (a, b, 0) and gives a ^ b and a & b. The second
// takes (a ^ b, cin, a & b) and gives the sum a ^ b ^ cin and the carry
// (a ^ b) & cin ^ a & b. Garbage outputs g1 = a and g2 = a ^ b keep the
// circuit reversible; nothing downstream uses them.
// Purely combinational, no clock.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout,
  output logic g1,
  output logic g2
);
  logic axb, ab;

  peres_gate u_pg0 (.a(a),   .b(b),   .c(1'b0), .p(g1), .q(axb),  .r(ab));
  peres_gate u_pg1 (.a(axb), .b(cin), .c(ab),   .p(g2), .q(s),    .r(cout));
endmodule
