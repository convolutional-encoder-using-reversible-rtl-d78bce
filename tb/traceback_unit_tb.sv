// traceback_unit_tb: drives the trace back unit with random decision bits and
// minimum-tree decisions and checks that every stage carries exactly the flag
// of the state reached by following the decisions back from the chosen final
// state (the predecessor of state t with decision d is 2d + t[1]).
module traceback_unit_tb;
  import conv_pkg::*;
  localparam int N = 5;
  logic dec  [N][N_STATES];
  logic flag [N][N_STATES];
  logic c_lo, c_hi, c_root;
  int checks = 0, failures = 0;

  traceback_unit #(.N(N)) dut (.dec(dec), .c_lo(c_lo), .c_hi(c_hi), .c_root(c_root), .flag(flag));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int st;
    for (int n = 0; n < 500; n++) begin
      for (int j = 0; j < N; j++)
        for (int s = 0; s < N_STATES; s++) dec[j][s] = 1'($urandom);
      {c_lo, c_hi, c_root} = 3'($urandom);
      #1;
      st = c_root ? (c_hi ? 3 : 2) : (c_lo ? 1 : 0);
      for (int j = N - 1; j >= 0; j--) begin
        for (int s = 0; s < N_STATES; s++) begin
          checks++;
          if (flag[j][s] !== (s == st)) begin
            failures++;
            if (failures < 10) $display("FAIL stage %0d state %0d flag=%b, path state %0d", j + 1, s, flag[j][s], st);
          end
        end
        st = 2 * int'(dec[j][st]) + (st >> 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
