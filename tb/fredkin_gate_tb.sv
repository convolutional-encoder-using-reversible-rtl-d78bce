// fredkin_gate_tb: exhaustive check of the Fredkin gate against
// P = A, Q = A'B xor AC, R = A'C xor AB, plus one-to-one mapping, its use as a
// multiplexer (Q selects B or C) and as an OR (C = 1 gives Q = A + B).
module fredkin_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    logic eq, er;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      eq = (!a && b) != (a && c);
      er = (!a && c) != (a && b);
      checks++;
      if (p !== a || q !== eq || r !== er) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
      if (c == 1'b1) begin
        checks++;
        if (q !== (a || b)) begin
          failures++;
          $display("FAIL OR use: a=%b b=%b q=%b", a, b, q);
        end
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
