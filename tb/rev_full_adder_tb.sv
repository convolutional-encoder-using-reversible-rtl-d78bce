// rev_full_adder_tb: exhaustive check of the two-Peres-gate full adder:
// {cout, s} = a + b + cin, garbage outputs g1 = a and g2 = a xor b.
module rev_full_adder_tb;
  logic a, b, cin, s, cout, g1, g2;
  int checks = 0, failures = 0;

  rev_full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout), .g1(g1), .g2(g2));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} !== 2'(total) || g1 !== a || g2 !== (a != b)) begin
        failures++;
        $display("FAIL %b+%b+%b -> cout=%b s=%b g1=%b g2=%b", a, b, cin, cout, s, g1, g2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
