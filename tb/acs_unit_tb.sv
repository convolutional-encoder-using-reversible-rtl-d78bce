// acs_unit_tb: checks the add-compare-select unit over every pair of incoming
// metrics below 12 (so the sums stay inside 4 bits), every received pair and
// every pair of branch words: the selected metric and decision, and each
// outgoing candidate = selected metric + Hamming distance of its branch word.
module acs_unit_tb;
  import conv_pkg::*;
  logic [3:0] pm_j, pm_jn, pm, pm_out0, pm_out1;
  symbol_t rx, word0, word1;
  logic c;
  int checks = 0, failures = 0;

  acs_unit #(.W(4)) dut (
    .pm_j(pm_j), .pm_jn(pm_jn), .rx(rx), .word0(word0), .word1(word1),
    .pm(pm), .c(c), .pm_out0(pm_out0), .pm_out1(pm_out1)
  );

  function automatic int hd(symbol_t x, symbol_t y);
    return int'(x[0] != y[0]) + int'(x[1] != y[1]);
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m, e0, e1;
    bit ec;
    for (int x = 0; x < 12; x++)
      for (int y = 0; y < 12; y++)
        for (int k = 0; k < 64; k++) begin
          pm_j = 4'(x); pm_jn = 4'(y);
          {rx, word0, word1} = 6'(k);
          #1;
          ec = (y < x);
          m  = ec ? y : x;
          e0 = m + hd(rx, word0);
          e1 = m + hd(rx, word1);
          checks++;
          if (int'(pm) != m || c !== ec || int'(pm_out0) != e0 || int'(pm_out1) != e1) begin
            failures++;
            if (failures < 10)
              $display("FAIL pm_j=%0d pm_jn=%0d rx=%b w0=%b w1=%b -> pm=%0d c=%b out=%0d,%0d",
                       x, y, rx, word0, word1, pm, c, pm_out0, pm_out1);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
