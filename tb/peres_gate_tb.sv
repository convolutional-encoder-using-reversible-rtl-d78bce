// peres_gate_tb: exhaustive check of the Peres gate, P = A, Q = A xor B,
// R = AB xor C, plus one-to-one mapping and its use as a half adder (C = 0).
module peres_gate_tb;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;

  peres_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    int ones;
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if (p !== a || q !== (a != b) || r !== ((a && b) != c)) begin
        failures++;
        $display("FAIL abc=%b%b%b -> pqr=%b%b%b", a, b, c, p, q, r);
      end
      if (c == 1'b0) begin
        ones = int'(a) + int'(b);
        checks++;
        if ({r, q} !== 2'(ones)) begin
          failures++;
          $display("FAIL half adder %b+%b gave carry %b sum %b", a, b, r, q);
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
