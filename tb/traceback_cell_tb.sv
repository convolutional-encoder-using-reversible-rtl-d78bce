// traceback_cell_tb: exhaustive check of the trace back cell: the flag goes to
// predecessor j when the decision is 0, to predecessor jn when it is 1, and
// nowhere when the flag is 0.
module traceback_cell_tb;
  logic f, c, f_j, f_jn;
  int checks = 0, failures = 0;

  traceback_cell dut (.f(f), .c(c), .f_j(f_j), .f_jn(f_jn));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {f, c} = 2'(i);
      #1;
      checks++;
      if (f_j !== (f && !c) || f_jn !== (f && c)) begin
        failures++;
        $display("FAIL f=%b c=%b -> f_j=%b f_jn=%b", f, c, f_j, f_jn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
