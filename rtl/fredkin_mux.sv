// fredkin_mux: W-bit 2:1 multiplexer built of W Fredkin gates.
//
// All gates share the select line sel as their control. With sel = 0 the
// output y is i1, with sel = 1 it is i2 (the Q output of each Fredkin gate).
// The swapped R outputs are garbage and not used. The width defaults to the
// 4-bit path metrics. Purely combinational, no clock.
module fredkin_mux #(
  parameter int unsigned W = 4
) (
  input  logic         sel,
  input  logic [W-1:0] i1,
  input  logic [W-1:0] i2,
  output logic [W-1:0] y
);
  logic [W-1:0] p_unused, r_unused;

  for (genvar i = 0; i < W; i++) begin : g_bit
    fredkin_gate u_fg (.a(sel), .b(i1[i]), .c(i2[i]), .p(p_unused[i]), .q(y[i]), .r(r_unused[i]));
  end
endmodule
