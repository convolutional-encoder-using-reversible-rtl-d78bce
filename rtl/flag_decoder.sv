// flag_decoder: turns the survivor flags of each trellis stage into the
// decoded message bit.
//
// The bit decoded at stage j is the newest bit of the flagged state, bit 0 of
// the state index. With one-hot flags that is flag[1] | flag[3], which equals
// flag[1] ^ flag[3]; one Feynman gate per stage forms it.
// Purely combinational, no clock.
module flag_decoder
  import conv_pkg::*;
#(
  parameter int unsigned N = N_STAGES
) (
  input  logic         flag [N][N_STATES],
  output logic [N-1:0] bits            // bits[j-1]: message bit decoded at stage j
);
  for (genvar j = 0; j < N; j++) begin : g_stage
    logic p_unused;
    feynman_gate u_fg (.a(flag[j][1]), .b(flag[j][3]), .p(p_unused), .q(bits[j]));
  end
endmodule
