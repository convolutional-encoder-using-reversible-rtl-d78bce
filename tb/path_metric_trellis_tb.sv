// path_metric_trellis_tb: checks the unrolled trellis (5 stages, 4-bit
// metrics). First the design's worked example: the received sequence
// 01 10 10 10 11 must give metrics 1,1 at stage 1 (states 0,1), 2,2,1,3 at
// stage 2 and a final minimum of 2. Then all 1024 possible received
// sequences against the reference Viterbi model: every reachable state's
// metric (unreachable ones must read 15), every decision of a reachable state
// with two reachable predecessors, and the minimum-tree result.
module path_metric_trellis_tb;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  localparam int N = 5;
  symbol_t    rx  [N];
  logic       dec [N][N_STATES];
  logic [3:0] pm  [N][N_STATES];
  logic       c_lo, c_hi, c_root;
  logic [3:0] pm_final;
  int checks = 0, failures = 0;

  path_metric_trellis #(.N(N), .W(4)) dut (
    .rx(rx), .dec(dec), .pm(pm), .c_lo(c_lo), .c_hi(c_hi), .c_root(c_root), .pm_final(pm_final)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [1:0] rxr [MAXN];
    ref_result_t r;
    int fs;
    // worked example
    rx = '{2'b01, 2'b10, 2'b10, 2'b10, 2'b11};
    #1;
    check(pm[0][0] == 1 && pm[0][1] == 1, "example stage 1 metrics");
    check(pm[1][0] == 2 && pm[1][1] == 2 && pm[1][2] == 1 && pm[1][3] == 3, "example stage 2 metrics");
    check(pm_final == 2, "example final metric");
    // all received sequences
    for (int v = 0; v < (1 << (2 * N)); v++) begin
      for (int i = 0; i < MAXN; i++) rxr[i] = '0;
      for (int j = 0; j < N; j++) begin
        rxr[j] = 2'(v >> (2 * j));
        rx[j]  = rxr[j];
      end
      r = ref_viterbi(rxr, N);
      #1;
      for (int j = 0; j < N; j++)
        for (int s = 0; s < N_STATES; s++) begin
          if (r.pm[j][s] >= BIG) check(pm[j][s] == 4'hF, $sformatf("v=%0d stage %0d state %0d unreachable", v, j + 1, s));
          else begin
            check(int'(pm[j][s]) == r.pm[j][s], $sformatf("v=%0d stage %0d state %0d pm=%0d ref %0d", v, j + 1, s, pm[j][s], r.pm[j][s]));
            check(dec[j][s] == r.dec[j][s], $sformatf("v=%0d stage %0d state %0d dec", v, j + 1, s));
          end
        end
      fs = c_root ? (c_hi ? 3 : 2) : (c_lo ? 1 : 0);
      check(fs == r.final_state && int'(pm_final) == r.final_pm,
            $sformatf("v=%0d final state %0d pm %0d, ref %0d pm %0d", v, fs, pm_final, r.final_state, r.final_pm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
