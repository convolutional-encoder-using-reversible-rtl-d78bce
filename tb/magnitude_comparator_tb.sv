// magnitude_comparator_tb: exhaustive check of the 4-bit comparator over
// all 256 operand pairs: exactly one of A>B, A=B, A<B, matching integers.
module magnitude_comparator_tb;
  localparam int W = 4;
  logic [W-1:0] a, b;
  logic a_gt, a_eq, a_lt;
  int checks = 0, failures = 0;

  magnitude_comparator #(.W(W)) dut (.a(a), .b(b), .a_gt(a_gt), .a_eq(a_eq), .a_lt(a_lt));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W)); i++) begin
      {a, b} = (2 * W)'(i);
      #1;
      checks++;
      if (a_gt !== (int'(a) > int'(b)) || a_eq !== (int'(a) == int'(b)) || a_lt !== (int'(a) < int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> gt=%b eq=%b lt=%b", a, b, a_gt, a_eq, a_lt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
