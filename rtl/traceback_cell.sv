// traceback_cell: passes the survivor flag of one trellis state back to the
// predecessor that its compare-and-select unit chose.
//
// f is 1 when this state lies on the survivor path; c is the state's compare
// decision (0: the predecessor "j" with dropped bit 0 was kept, 1: the
// predecessor "jn" with dropped bit 1). Two Feynman gates with constant target
// lines form ~c (target 1) and c (target 0); two Toffoli gates with target 0
// AND them with f. So f_j = f & ~c and f_jn = f & c: at most one of them is 1.
// The gate types and their constant inputs follow the original trace back
// circuit; how exactly they are wired is this implementation's reading of it.
// Purely combinational, no clock.
module traceback_cell (
  input  logic f,
  input  logic c,
  output logic f_j,
  output logic f_jn
);
  logic c_n, c_b;
  logic p0_unused, p1_unused;
  logic a0_unused, b0_unused, a1_unused, b1_unused;

  feynman_gate u_inv (.a(c), .b(1'b1), .p(p0_unused), .q(c_n));
  feynman_gate u_buf (.a(c), .b(1'b0), .p(p1_unused), .q(c_b));

  toffoli_gate u_and_j  (.a(f), .b(c_n), .c(1'b0), .p(a0_unused), .q(b0_unused), .r(f_j));
  toffoli_gate u_and_jn (.a(f), .b(c_b), .c(1'b0), .p(a1_unused), .q(b1_unused), .r(f_jn));
endmodule
