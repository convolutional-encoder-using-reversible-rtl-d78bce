// conv_codec_top_tb: end-to-end test of the encoder, block buffer, error
// mask and parallel Viterbi decoder at the default size (5-bit blocks,
// 4-bit path metrics).
//
// Blocks are sent bit-serially; for each the testbench holds an error mask
// and, when block_valid pulses, compares decoded and decoded_pm with the
// reference encoder and Viterbi model, and checks that block_valid comes
// 2 cycles after the block's last message bit. The block sequence is:
//   1. the worked example: message 10100 with the error pattern that turns
//      11 10 00 10 11 into 01 10 10 10 11 (decoded 10100, metric 2);
//   2. random messages with no errors, one correctable error in the first
//      three symbol pairs, and fully random error masks;
//   3. blocks sent back to back and blocks with idle cycles inside.
// It counts how often each mechanism was exercised: error-free decoding,
// error correction, a block starting while the encoder held a non-zero
// state (clear at block start), a back-to-back block start and an idle
// cycle inside a block; any count left at zero is a failure.
module conv_codec_top_tb;
  import conv_pkg::*;
  import conv_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic msg_valid = 1'b0, msg = 1'b0;
  logic [2*N_STAGES-1:0] err_mask = '0;
  symbol_t code;
  logic code_valid;
  logic [N_STAGES-1:0] decoded;
  logic [PM_W-1:0] decoded_pm;
  logic block_valid;

  int checks = 0, failures = 0;
  int cycle = 0;
  int n_clean = 0, n_corrected = 0, n_clear_nonzero = 0, n_back_to_back = 0, n_gap = 0;

  conv_codec_top dut (
    .clk(clk), .rst_n(rst_n), .msg_valid(msg_valid), .msg(msg), .err_mask(err_mask),
    .code(code), .code_valid(code_valid),
    .decoded(decoded), .decoded_pm(decoded_pm), .block_valid(block_valid)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // expected results, one entry per block
  typedef struct {
    logic [N_STAGES-1:0] bits;
    int                  pm;
    int                  due;     // cycle count at which block_valid is seen
    bit                  errors;
    bit                  matches_msg;
  } exp_t;
  exp_t exp_q [$];
  bit   last_block_end;   // the previous block ended on the cycle before
  bit [1:0] last_two = '0; // the two most recent message bits: the encoder's state

  // send one block; gap_at >= 0 inserts an idle cycle before that bit
  task automatic send_block(input logic [N_STAGES-1:0] m, input logic [2*N_STAGES-1:0] mask, input int gap_at);
    bit msgb [MAXN];
    bit [1:0] codeb [MAXN];
    bit [1:0] rxb [MAXN];
    ref_result_t r;
    exp_t e;
    for (int i = 0; i < MAXN; i++) msgb[i] = (i < N_STAGES) ? m[i] : 1'b0;
    ref_encode(msgb, N_STAGES, codeb);
    for (int i = 0; i < MAXN; i++) rxb[i] = (i < N_STAGES) ? codeb[i] ^ mask[2*i +: 2] : 2'b00;
    r = ref_viterbi(rxb, N_STAGES);
    for (int j = 0; j < N_STAGES; j++) e.bits[j] = r.bits[j];
    e.pm = r.final_pm;
    e.errors = (mask != '0);
    e.matches_msg = (e.bits == m);
    if (last_block_end) n_back_to_back++;
    if (last_two != 2'b00) n_clear_nonzero++;
    err_mask = mask;
    for (int i = 0; i < N_STAGES; i++) begin
      if (i == gap_at) begin
        msg_valid = 1'b0;
        @(posedge clk); #1;
        n_gap++;
      end
      msg_valid = 1'b1;
      msg = m[i];
      last_two = {last_two[0], m[i]};
      @(posedge clk); #1;
    end
    e.due = cycle + 2;
    exp_q.push_back(e);
    msg_valid = 1'b0;
    last_block_end = 1'b1;
  endtask

  task automatic idle(input int n);
    msg_valid = 1'b0;
    repeat (n) begin
      @(posedge clk); #1;
    end
    last_block_end = 1'b0;
  endtask

  // result monitor
  always @(posedge clk) begin
    if (rst_n && block_valid) begin
      exp_t e;
      if (exp_q.size() == 0) check(0, "block_valid with no block outstanding");
      else begin
        e = exp_q.pop_front();
        check(decoded === e.bits && int'(decoded_pm) == e.pm,
              $sformatf("decoded %b pm %0d, expected %b pm %0d", decoded, decoded_pm, e.bits, e.pm));
        check(cycle == e.due, $sformatf("block_valid at cycle %0d, expected %0d", cycle, e.due));
        if (!e.errors && decoded === e.bits) n_clean++;
        if (e.errors && e.matches_msg && decoded === e.bits) n_corrected++;
      end
    end
  end

  initial begin
    logic [N_STAGES-1:0] m;
    logic [2*N_STAGES-1:0] mask;
    int sel;
    last_block_end = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    idle(2);

    // 1. worked example: 10100 -> 11 10 00 10 11 received as 01 10 10 10 11
    //    mask pair 0 = 11^01 = 10, pair 2 = 00^10 = 10
    send_block(5'b00101, 10'b00_00_10_00_10, -1);
    idle(3);

    // 2./3. random blocks
    for (int b = 0; b < 400; b++) begin
      m = N_STAGES'($urandom);
      sel = $urandom_range(0, 2);
      if (sel == 0) mask = '0;
      else if (sel == 1) mask = (2*N_STAGES)'(1) << $urandom_range(0, 5);
      else mask = (2*N_STAGES)'($urandom);
      send_block(m, mask, ($urandom_range(0, 7) == 0) ? $urandom_range(1, N_STAGES - 1) : -1);
      if ($urandom_range(0, 1) == 0) idle($urandom_range(1, 3));
    end
    idle(5);
    check(exp_q.size() == 0, "blocks left undecoded");

    $display("mechanisms: clean=%0d corrected=%0d clear_nonzero=%0d back_to_back=%0d gap=%0d",
             n_clean, n_corrected, n_clear_nonzero, n_back_to_back, n_gap);
    check(n_clean > 0, "no error-free block decoded");
    check(n_corrected > 0, "no block with errors corrected");
    check(n_clear_nonzero > 0, "encoder never cleared from a non-zero state");
    check(n_back_to_back > 0, "no back-to-back blocks");
    check(n_gap > 0, "no idle cycle inside a block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
