// viterbi_decoder_tb: end-to-end check of the parallel Viterbi decoder
// (5 stages, 4-bit metrics).
//   * Worked example: the message 10100 is sent as 11 10 00 10 11 and
//     received with errors as 01 10 10 10 11; the decoder must return 10100
//     with path metric 2.
//   * Every 5-bit message, sent without errors, decodes to itself with
//     metric 0.
//   * All 1024 received sequences give the bits and metric of the reference
//     Viterbi model.
//   * Every single-bit error in the first three symbol pairs of every message
//     is corrected (later errors can be ambiguous, the block is not
//     terminated).
//   * A second instance with 12 stages and 5-bit metrics matches the
//     reference model on random received sequences, with and without a
//     random message underneath.
module viterbi_decoder_tb;
  import conv_pkg::*;
  import conv_ref_pkg::*;
  localparam int N = 5;
  symbol_t    rx [N];
  logic [N-1:0] bits;
  logic [3:0] pm_final;
  int checks = 0, failures = 0;

  viterbi_decoder #(.N(N), .W(4)) dut (.rx(rx), .bits(bits), .pm_final(pm_final));

  localparam int NL = 12;
  symbol_t       rx_l [NL];
  logic [NL-1:0] bits_l;
  logic [4:0]    pm_l;
  viterbi_decoder #(.N(NL), .W(5)) dut_l (.rx(rx_l), .bits(bits_l), .pm_final(pm_l));

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
    bit msg [MAXN];
    bit [1:0] code [MAXN];
    bit [1:0] rxr [MAXN];
    ref_result_t r;
    logic [N-1:0] exp_bits;

    rx = '{2'b01, 2'b10, 2'b10, 2'b10, 2'b11};
    #1;
    check(bits == 5'b00101 && pm_final == 2, $sformatf("example: bits %b pm %0d", bits, pm_final));

    for (int m = 0; m < (1 << N); m++) begin
      for (int i = 0; i < MAXN; i++) msg[i] = (i < N) ? bit'(m >> i) : 1'b0;
      ref_encode(msg, N, code);
      for (int j = 0; j < N; j++) rx[j] = code[j];
      #1;
      check(bits == N'(m) && pm_final == 0, $sformatf("clean msg %b: bits %b pm %0d", N'(m), bits, pm_final));
      for (int e = 0; e < 6; e++) begin
        rx[e / 2] = code[e / 2] ^ (2'b01 << (e % 2));
        #1;
        check(bits == N'(m) && pm_final == 1, $sformatf("msg %b error bit %0d: bits %b pm %0d", N'(m), e, bits, pm_final));
        rx[e / 2] = code[e / 2];
      end
    end

    for (int v = 0; v < (1 << (2 * N)); v++) begin
      for (int i = 0; i < MAXN; i++) rxr[i] = '0;
      for (int j = 0; j < N; j++) begin
        rxr[j] = 2'(v >> (2 * j));
        rx[j]  = rxr[j];
      end
      r = ref_viterbi(rxr, N);
      for (int j = 0; j < N; j++) exp_bits[j] = r.bits[j];
      #1;
      check(bits == exp_bits && int'(pm_final) == r.final_pm,
            $sformatf("v=%0d bits %b pm %0d, ref %b pm %0d", v, bits, pm_final, exp_bits, r.final_pm));
    end
    // larger configuration: random messages through a channel with a few errors
    for (int n = 0; n < 3000; n++) begin
      logic [NL-1:0] exp_l;
      for (int i = 0; i < MAXN; i++) msg[i] = (i < NL) ? 1'($urandom) : 1'b0;
      ref_encode(msg, NL, code);
      for (int i = 0; i < MAXN; i++) rxr[i] = '0;
      for (int j = 0; j < NL; j++) begin
        rxr[j] = code[j];
        if ($urandom_range(0, 7) == 0) rxr[j] ^= 2'($urandom_range(1, 3));
        if (n % 4 == 3) rxr[j] = 2'($urandom);   // pure noise now and then
        rx_l[j] = rxr[j];
      end
      r = ref_viterbi(rxr, NL);
      for (int j = 0; j < NL; j++) exp_l[j] = r.bits[j];
      #1;
      check(bits_l == exp_l && int'(pm_l) == r.final_pm,
            $sformatf("N=12: bits %b pm %0d, ref %b pm %0d", bits_l, pm_l, exp_l, r.final_pm));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
