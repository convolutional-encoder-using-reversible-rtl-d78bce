// branch_metric_unit_tb: exhaustive check of the branch metric unit: for all
// received pairs and branch words the metric is the number of differing bits,
// zero-extended to 4 bits.
module branch_metric_unit_tb;
  import conv_pkg::*;
  symbol_t rx, word;
  logic [3:0] bm;
  int checks = 0, failures = 0;

  branch_metric_unit #(.W(4)) dut (.rx(rx), .word(word), .bm(bm));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    for (int i = 0; i < 16; i++) begin
      {rx, word} = 4'(i);
      #1;
      d = (rx[0] != word[0]) + (rx[1] != word[1]);
      checks++;
      if (int'(bm) != d) begin
        failures++;
        $display("FAIL rx=%b word=%b -> bm=%0d expected %0d", rx, word, bm, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
