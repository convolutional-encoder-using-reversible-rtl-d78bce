// feynman_gate_tb: exhaustive truth-table check of the Feynman (CNOT) gate
// against the printed table: (a,b) -> (p,q) = 00->00, 01->01, 10->11, 11->10.
module feynman_gate_tb;
  logic a, b, p, q;
  int checks = 0, failures = 0;
  // expected {p,q} for input index {a,b}
  localparam logic [1:0] EXP [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] seen;
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({p, q} !== EXP[i]) begin
        failures++;
        $display("FAIL a=%b b=%b -> p=%b q=%b, expected %b", a, b, p, q, EXP[i]);
      end
      seen[{p, q}] = 1'b1;
    end
    // reversibility: every output vector appears once
    checks++;
    if (seen !== 4'hF) begin
      failures++;
      $display("FAIL mapping is not one-to-one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
