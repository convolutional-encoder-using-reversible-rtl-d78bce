// compare_select_tb: exhaustive check of the compare-and-select unit over all
// 4-bit metric pairs: C = 0 passes PMij, C = 1 passes PMijn, the smaller wins
// and a tie keeps PMij.
module compare_select_tb;
  localparam int W = 4;
  logic [W-1:0] pm_j, pm_jn, pm_min;
  logic c;
  int checks = 0, failures = 0;

  compare_select #(.W(W)) dut (.pm_j(pm_j), .pm_jn(pm_jn), .pm_min(pm_min), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int m;
    for (int i = 0; i < (1 << (2 * W)); i++) begin
      {pm_j, pm_jn} = (2 * W)'(i);
      #1;
      m = (int'(pm_jn) < int'(pm_j)) ? int'(pm_jn) : int'(pm_j);
      checks++;
      if (int'(pm_min) != m || c !== (int'(pm_jn) < int'(pm_j))) begin
        failures++;
        $display("FAIL pm_j=%0d pm_jn=%0d -> min=%0d c=%b", pm_j, pm_jn, pm_min, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
