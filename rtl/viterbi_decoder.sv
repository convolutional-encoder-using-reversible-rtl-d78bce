// viterbi_decoder: parallel hard-decision Viterbi decoder for the rate-1/2,
// constraint-length-3 code, without survivor memory.
//
// A block of N received symbol pairs (rx[0] first) is decoded in one pass of
// combinational logic: the path metric trellis computes every state's metric
// and compare decision at every stage, the trace back unit turns the decisions
// into one-hot survivor flags, and the flag decoder reads the message bits off
// the flags. The block must start in encoder state 0; it need not end in a
// known state, the decoder picks the final state with the smallest metric.
// bits[0] is the first message bit. pm_final is the metric of the chosen path,
// the number of symbol bits in which rx differs from the re-encoded decision.
// Purely combinational, no clock: outputs settle a logic delay after rx.
module viterbi_decoder
  import conv_pkg::*;
#(
  parameter int unsigned N = N_STAGES,
  parameter int unsigned W = PM_W
) (
  input  symbol_t      rx [N],
  output logic [N-1:0] bits,
  output logic [W-1:0] pm_final
);
  logic         dec  [N][N_STATES];
  logic [W-1:0] pm   [N][N_STATES];
  logic         flag [N][N_STATES];
  logic         c_lo, c_hi, c_root;

  path_metric_trellis #(.N(N), .W(W)) u_pmt (
    .rx(rx), .dec(dec), .pm(pm), .c_lo(c_lo), .c_hi(c_hi), .c_root(c_root), .pm_final(pm_final)
  );
  traceback_unit #(.N(N)) u_tbu (
    .dec(dec), .c_lo(c_lo), .c_hi(c_hi), .c_root(c_root), .flag(flag)
  );
  flag_decoder #(.N(N)) u_dec (.flag(flag), .bits(bits));
endmodule
