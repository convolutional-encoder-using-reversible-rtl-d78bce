// magnitude_comparator: W-bit unsigned magnitude comparator.
//
// Gives the three outputs of the design's comparator, a_gt (A > B), a_eq
// (A = B) and a_lt (A < B); exactly one of them is 1. It works from the most
// significant bit down: at each bit position the result so far is kept if it
// is already decided, otherwise the bit pair decides it. The width defaults to
// the 4 bits of the path metrics. Purely combinational, no clock.
// The original design gives the comparator's ports and function but its gate
// structure only as a transistor schematic; the MSB-first description here is
// this implementation's own.
module magnitude_comparator #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         a_gt,
  output logic         a_eq,
  output logic         a_lt
);
  always_comb begin
    a_gt = 1'b0;
    a_lt = 1'b0;
    for (int i = W - 1; i >= 0; i--) begin
      if (!a_gt && !a_lt) begin
        a_gt = a[i] & ~b[i];
        a_lt = ~a[i] & b[i];
      end
    end
    a_eq = ~(a_gt | a_lt);
  end
endmodule
