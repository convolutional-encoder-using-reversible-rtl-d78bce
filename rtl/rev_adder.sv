// rev_adder: W-bit ripple-carry adder of Peres-gate full adders.
//
// Adds two unsigned W-bit numbers and a carry in. The carry ripples from bit 0
// up through one rev_full_adder per bit; the final carry is brought out so a
// caller can detect overflow. The width defaults to the 4 bits of the path
// metric adders of the ACS unit. The garbage lines of the full adders are not
// used. Purely combinational, no clock.
// Building the adder from Peres-gate full adders follows the original
// design; chaining them as a ripple-carry adder is this implementation's
// choice.
module rev_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c;
  logic [W-1:0] g1_unused, g2_unused;

  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_bit
    rev_full_adder u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]),
      .s(sum[i]), .cout(c[i+1]),
      .g1(g1_unused[i]), .g2(g2_unused[i])
    );
  end
  assign cout = c[W];
endmodule
