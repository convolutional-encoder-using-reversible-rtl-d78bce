// flag_decoder_tb: checks the flag decoder. First the 5-stage example of the
// design's decoding figure: flagged states 1, 2, 1, 2, 0 (one-hot per stage)
// must give the bits 1 0 1 0 0. Then random one-hot flag patterns, where each
// stage's bit must be the newest bit (bit 0) of the flagged state.
module flag_decoder_tb;
  import conv_pkg::*;
  localparam int N = 5;
  logic flag [N][N_STATES];
  logic [N-1:0] bits;
  int checks = 0, failures = 0;

  flag_decoder #(.N(N)) dut (.flag(flag), .bits(bits));

  task automatic set_states(input int st [N]);
    for (int j = 0; j < N; j++)
      for (int s = 0; s < N_STATES; s++) flag[j][s] = (st[j] == s);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st [N];
    logic [N-1:0] exp_bits;
    st = '{1, 2, 1, 2, 0};
    set_states(st);
    #1;
    checks++;
    if (bits !== 5'b00101) begin   // bits[0] = first stage
      failures++;
      $display("FAIL example: bits=%b", bits);
    end
    for (int n = 0; n < 200; n++) begin
      for (int j = 0; j < N; j++) begin
        st[j] = int'($urandom_range(0, N_STATES - 1));
        exp_bits[j] = st[j][0];
      end
      set_states(st);
      #1;
      checks++;
      if (bits !== exp_bits) begin
        failures++;
        $display("FAIL random: bits=%b expected %b", bits, exp_bits);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
