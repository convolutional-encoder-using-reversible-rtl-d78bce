// conv_encoder: rate-1/2, constraint-length-3 convolutional encoder.
//
// A three-cell shift register holds the current message bit m (cell 0) and
// the two before it (cells 1 and 2). Two Feynman (CNOT) gates form the code
// bits: the first gives c1 = m ^ cell2, the second XORs cell 1 into that,
// c2 = m ^ cell1 ^ cell2. Each symbol pair is sent as {c2, c1}, i.e. the
// generators are 111 then 101, and the message 10100 gives 11 10 00 10 11.
//
// Timing: when in_valid is high at a rising clock edge, msg enters the shift
// register; the symbol pair for it is on code in the following cycle, flagged
// by code_valid. clr (synchronous) empties the register before the shift of
// the same edge, so a block can start from the all-zero state with no idle
// cycle. rst_n is an active-low asynchronous reset to the all-zero state.
// The register cells, the gate arrangement and the output order follow the
// original design and its worked example; the valid/clear handshake and the
// reset style are this implementation's own.
module conv_encoder
  import conv_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    clr,
  input  logic    in_valid,
  input  logic    msg,
  output symbol_t code,       // {first, second} = {c2, c1}
  output logic    code_valid
);
  logic [K-1:0] sr, sr_next;   // sr[0] newest bit
  logic         c1, c2;
  logic         p0_unused, p1_unused;

  always_comb begin
    sr_next = clr ? '0 : sr;
    if (in_valid) sr_next = {sr_next[K-2:0], msg};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr         <= '0;
      code_valid <= 1'b0;
    end else begin
      sr         <= sr_next;
      code_valid <= in_valid;
    end
  end

  feynman_gate u_cnot1 (.a(sr[0]), .b(sr[2]), .p(p0_unused), .q(c1));
  feynman_gate u_cnot2 (.a(c1),    .b(sr[1]), .p(p1_unused), .q(c2));

  assign code = {c2, c1};
endmodule
