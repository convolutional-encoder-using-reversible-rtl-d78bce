// acs_unit: add-compare-select unit of one trellis state at one stage.
//
// The unit is organised as in the design's decoder: it first compares the two
// candidate metrics that arrive at its state (pm_j from the predecessor whose
// dropped bit is 0, pm_jn from the one whose dropped bit is 1) and keeps the
// smaller as the state's path metric pm. It then adds to pm the branch metric
// of each of the two branches that leave the state in the next stage, giving
// the candidates pm_out0 (input bit 0, branch word word0) and pm_out1 (input
// bit 1, branch word word1). Each branch metric comes from its own branch
// metric unit fed with the next received symbol rx; each sum from a W-bit
// Peres-gate adder with carry in 0. The decision c (1 when pm_jn was taken)
// goes to the trace back unit.
//
// The caller keeps metrics small enough that the adders never overflow; the
// carries are not used. Purely combinational, no clock.
module acs_unit
  import conv_pkg::*;
#(
  parameter int unsigned W = PM_W
) (
  input  logic [W-1:0] pm_j,
  input  logic [W-1:0] pm_jn,
  input  symbol_t      rx,
  input  symbol_t      word0,
  input  symbol_t      word1,
  output logic [W-1:0] pm,
  output logic         c,
  output logic [W-1:0] pm_out0,
  output logic [W-1:0] pm_out1
);
  logic [W-1:0] bm0, bm1;
  logic         co0_unused, co1_unused;

  compare_select #(.W(W)) u_cs (.pm_j(pm_j), .pm_jn(pm_jn), .pm_min(pm), .c(c));

  branch_metric_unit #(.W(W)) u_bmu0 (.rx(rx), .word(word0), .bm(bm0));
  branch_metric_unit #(.W(W)) u_bmu1 (.rx(rx), .word(word1), .bm(bm1));

  rev_adder #(.W(W)) u_add0 (.a(pm), .b(bm0), .cin(1'b0), .sum(pm_out0), .cout(co0_unused));
  rev_adder #(.W(W)) u_add1 (.a(pm), .b(bm1), .cin(1'b0), .sum(pm_out1), .cout(co1_unused));
endmodule
