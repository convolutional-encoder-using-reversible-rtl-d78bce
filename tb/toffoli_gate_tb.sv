// toffoli_gate_tb: exhaustive check of the Toffoli gate: controls pass
// through, the target flips only when both controls are 1; with the target
// tied to 0 it is an AND. Also checks that the mapping is one-to-one.
module toffoli_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    logic exp_r;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp_r = (a == 1'b1 && b == 1'b1) ? ~c : c;
      checks++;
      if (p !== a || q !== b || r !== exp_r) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL mapping is not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
