// traceback_unit: finds the survivor path by passing one-hot flags backwards
// through the trellis, with no survivor path memory.
//
// At the last stage N the flag is set for the state that the minimum tree of
// the trellis picked: a root flag of 1 is split by c_root between the state
// pairs {0,1} and {2,3}, then by c_lo or c_hi inside the pair. For each earlier
// stage, every state hands its flag to the predecessor its compare decision
// kept (traceback_cell), and each predecessor ORs what its two successors hand
// it with a Fredkin gate whose third input is tied to 1. As only one state per
// stage carries a flag, flag[j-1] is one-hot for every stage j = 1 .. N, and
// the flagged states form the decoded path. Stage 0 (always state 0) needs no
// flag.
// Purely combinational, no clock.
module traceback_unit
  import conv_pkg::*;
#(
  parameter int unsigned N = N_STAGES
) (
  input  logic dec  [N][N_STATES],
  input  logic c_lo,
  input  logic c_hi,
  input  logic c_root,
  output logic flag [N][N_STATES]
);
  // Each stage j (1 .. N) is a generate block g_stage[j] holding its flags f.
  for (genvar j = N; j >= 1; j--) begin : g_stage
    logic [N_STATES-1:0] f;
    if (j == N) begin : g_last
      // one-hot flag of the state with the minimum metric
      logic f_lo, f_hi;
      traceback_cell u_root (.f(1'b1), .c(c_root), .f_j(f_lo), .f_jn(f_hi));
      traceback_cell u_lo   (.f(f_lo), .c(c_lo), .f_j(f[0]), .f_jn(f[1]));
      traceback_cell u_hi   (.f(f_hi), .c(c_hi), .f_j(f[2]), .f_jn(f[3]));
    end else begin : g_back
      // back[t][k]: flag that state t of stage j+1 hands to its predecessor k
      logic back [N_STATES][2];
      for (genvar t = 0; t < N_STATES; t++) begin : g_cell
        traceback_cell u_cell (
          .f(g_stage[j+1].f[t]), .c(dec[j][t]), .f_j(back[t][0]), .f_jn(back[t][1])
        );
      end
      for (genvar s = 0; s < N_STATES; s++) begin : g_or
        localparam state_t S = state_t'(s);
        localparam int unsigned T0 = 2 * int'(S[0]);
        localparam int unsigned T1 = 2 * int'(S[0]) + 1;
        logic p_unused, r_unused;
        fredkin_gate u_or (
          .a(back[T0][S[1]]), .b(back[T1][S[1]]), .c(1'b1),
          .p(p_unused), .q(f[s]), .r(r_unused)
        );
      end
    end
    for (genvar s = 0; s < N_STATES; s++) begin : g_out
      assign flag[j-1][s] = f[s];
    end
  end
endmodule
