// path_metric_trellis: the fully unrolled trellis of the parallel Viterbi
// decoder, from the known start state 0 to the state with the smallest final
// path metric.
//
// All N trellis stages are laid out side by side as combinational logic, so a
// whole block of N received symbol pairs is processed at once; there are no
// registers and no survivor memory. Stage numbering follows the trellis: the
// encoder starts in state 0 at stage 0, and symbol rx[j-1] is the one received
// on the branches from stage j-1 to stage j.
//
//   * Stage 0 is not a row of ACS units: the encoder is known to start in
//     state 0 with metric 0, so two branch metric units (branch words 00 and
//     11) give the candidate metrics of states 0 and 1 at stage 1 directly.
//   * Stages 1 .. N-1 hold one ACS unit per state. Each selects its state's
//     metric and produces the candidates for its two successor states.
//     Stage 1 has ACS units only for the reachable states 0 and 1.
//   * Stage N holds compare-and-select units only, since no branch leaves it.
//   * A tree of three compare-and-select units finds the smallest metric of
//     stage N: states 0/1 (decision c_lo), states 2/3 (c_hi), then the two
//     winners (c_root).
//
// Where a predecessor does not exist (stages 1 and 2 before all states are
// reachable) the candidate input is tied to UNREACH, the largest W-bit value,
// so that it is never selected. This holds as long as every real metric stays
// below UNREACH: a metric at stage j is at most 2j, hence 2N <= 2^W - 2,
// which is checked at elaboration (N <= 7 for the default 4-bit metrics).
// The original design marks missing predecessors with the value 16, which
// needs a fifth bit; the all-ones 4-bit value does the same job here. The
// stage layout, the ACS organisation and the minimum tree follow the
// original; the default of 5 stages is the length of its worked example.
//
// Outputs: dec[j-1][s] is the compare decision of state s at stage j (1 when
// the predecessor with dropped bit 1 was kept), pm[j-1][s] the path metric of
// state s at stage j, plus the tree decisions and the final minimum metric.
// Purely combinational, no clock.
module path_metric_trellis
  import conv_pkg::*;
#(
  parameter int unsigned N = N_STAGES,
  parameter int unsigned W = PM_W
) (
  input  symbol_t      rx     [N],
  output logic         dec    [N][N_STATES],
  output logic [W-1:0] pm     [N][N_STATES],
  output logic         c_lo,
  output logic         c_hi,
  output logic         c_root,
  output logic [W-1:0] pm_final
);
  localparam logic [W-1:0] UNREACH = '1;

  if (N < 2 || 2 * N > (1 << W) - 2) begin : g_bad_size
    $error("path_metric_trellis: N=%0d stages do not fit %0d-bit path metrics", N, W);
  end

  // Each stage j (1 .. N) is a generate block g_stage[j]. Its array cand
  // holds the candidate metrics arriving at its states: cand[t][k] comes
  // from predecessor k of state t (0: {0, t[1]}, 1: {1, t[1]}). Its array
  // nxt holds the candidates it sends to stage j+1, indexed the same way.
  for (genvar j = 1; j <= N; j++) begin : g_stage
    logic [W-1:0] cand [N_STATES][2];
    logic [W-1:0] nxt  [N_STATES][2];
    logic [W-1:0] pm_s [N_STATES];

    if (j == 1) begin : g_first
      // Stage 0 -> 1: start state 0 with metric 0, branch words 00 and 11.
      logic [W-1:0] bm_init [2];
      for (genvar u = 0; u < 2; u++) begin : g_init_bmu
        branch_metric_unit #(.W(W)) u_bmu (
          .rx(rx[0]), .word(branch_word(state_t'(0), u[0])), .bm(bm_init[u])
        );
      end
      for (genvar t = 0; t < N_STATES; t++) begin : g_init_cand
        if (t < 2) begin : g_reach
          assign cand[t][0] = bm_init[t];
          assign cand[t][1] = UNREACH;
        end else begin : g_unreach
          assign cand[t][0] = UNREACH;
          assign cand[t][1] = UNREACH;
        end
      end
    end else begin : g_next
      assign cand = g_stage[j-1].nxt;
    end

    for (genvar s = 0; s < N_STATES; s++) begin : g_state
      localparam state_t S = state_t'(s);
      // successors {s[0], u}; this state is their predecessor number s[1]
      localparam int unsigned T0 = 2 * int'(S[0]);
      localparam int unsigned T1 = 2 * int'(S[0]) + 1;
      if (j == N) begin : g_cs
        // last stage: compare and select only
        compare_select #(.W(W)) u_cs (
          .pm_j(cand[s][0]), .pm_jn(cand[s][1]), .pm_min(pm_s[s]), .c(dec[j-1][s])
        );
      end else if (j == 1 && s >= 2) begin : g_absent
        assign pm_s[s]        = UNREACH;
        assign dec[j-1][s]    = 1'b0;
        assign nxt[T0][S[1]]  = UNREACH;
        assign nxt[T1][S[1]]  = UNREACH;
      end else begin : g_acs
        acs_unit #(.W(W)) u_acs (
          .pm_j   (cand[s][0]),
          .pm_jn  (cand[s][1]),
          .rx     (rx[j]),
          .word0  (branch_word(S, 1'b0)),
          .word1  (branch_word(S, 1'b1)),
          .pm     (pm_s[s]),
          .c      (dec[j-1][s]),
          .pm_out0(nxt[T0][S[1]]),
          .pm_out1(nxt[T1][S[1]])
        );
      end
      assign pm[j-1][s] = pm_s[s];
    end
    if (j == N) begin : g_no_next
      for (genvar t = 0; t < N_STATES; t++) begin : g_tie
        assign nxt[t][0] = '0;
        assign nxt[t][1] = '0;
      end
    end
  end

  // Minimum over the final states.
  logic [W-1:0] m_lo, m_hi;
  compare_select #(.W(W)) u_min_lo   (.pm_j(g_stage[N].pm_s[0]), .pm_jn(g_stage[N].pm_s[1]), .pm_min(m_lo),     .c(c_lo));
  compare_select #(.W(W)) u_min_hi   (.pm_j(g_stage[N].pm_s[2]), .pm_jn(g_stage[N].pm_s[3]), .pm_min(m_hi),     .c(c_hi));
  compare_select #(.W(W)) u_min_root (.pm_j(m_lo),               .pm_jn(m_hi),               .pm_min(pm_final), .c(c_root));
endmodule
