// conv_encoder_tb: checks the convolutional encoder.
//   * The message 10100 from the all-zero state gives 11 10 00 10 11.
//   * Each symbol pair appears exactly one cycle after its message bit.
//   * A random stream with random idle cycles matches the reference encoder.
//   * clr together with a new bit restarts from the all-zero state.
module conv_encoder_tb;
  import conv_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clr, in_valid, msg;
  symbol_t code;
  logic code_valid;
  int checks = 0, failures = 0;
  int cycle = 0;

  conv_encoder dut (
    .clk(clk), .rst_n(rst_n), .clr(clr), .in_valid(in_valid), .msg(msg),
    .code(code), .code_valid(code_valid)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference state and expected output queue
  bit d1 = 0, d2 = 0;
  symbol_t exp_q [$];
  int      exp_cycle [$];

  task automatic send(input bit b, input bit do_clr);
    if (do_clr) begin d1 = 0; d2 = 0; end
    exp_q.push_back({b ^ d1 ^ d2, b ^ d2});
    exp_cycle.push_back(cycle + 1);
    d2 = d1; d1 = b;
    clr = do_clr; in_valid = 1'b1; msg = b;
    @(posedge clk);
    #1 clr = 1'b0; in_valid = 1'b0;
  endtask

  // output monitor
  always @(posedge clk) begin
    if (rst_n && code_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %b", code);
      end else begin
        symbol_t e;
        int ec;
        e  = exp_q.pop_front();
        ec = exp_cycle.pop_front();
        if (code !== e || cycle != ec) begin
          failures++;
          $display("FAIL code %b at cycle %0d, expected %b at cycle %0d", code, cycle, e, ec);
        end
      end
    end
  end

  initial begin
    symbol_t example [5];
    int      got;
    clr = 0; in_valid = 0; msg = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    @(posedge clk); #1;

    // worked example, captured directly as well
    example = '{2'b11, 2'b10, 2'b00, 2'b10, 2'b11};
    got = 0;
    fork
      begin
        send(1, 0); send(0, 0); send(1, 0); send(0, 0); send(0, 0);
      end
      begin
        while (got < 5) begin
          @(posedge clk);
          if (code_valid) begin
            checks++;
            if (code !== example[got]) begin
              failures++;
              $display("FAIL example pair %0d: %b expected %b", got, code, example[got]);
            end
            got++;
          end
        end
      end
    join

    // random stream with gaps and occasional restarts
    for (int i = 0; i < 400; i++) begin
      if ($urandom_range(0, 3) == 0) begin
        @(posedge clk); #1;
      end
      send(1'($urandom), $urandom_range(0, 15) == 0);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
