// rev_adder_tb: exhaustive check of the 4-bit Peres-gate ripple adder:
// all 256 operand pairs with carry in 0 and 1, against integer addition.
module rev_adder_tb;
  localparam int W = 4;
  logic [W-1:0] a, b, sum;
  logic cin, cout;
  int checks = 0, failures = 0;

  rev_adder #(.W(W)) dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {cin, a, b} = (2 * W + 1)'(i);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, sum} !== (W + 1)'(total)) begin
        failures++;
        $display("FAIL %0d+%0d+%0d -> %0d carry %b", a, b, cin, sum, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
