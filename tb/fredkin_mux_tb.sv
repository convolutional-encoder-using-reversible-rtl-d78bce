// fredkin_mux_tb: exhaustive check of the 4-bit Fredkin multiplexer:
// select 0 passes i1, select 1 passes i2.
module fredkin_mux_tb;
  localparam int W = 4;
  logic sel;
  logic [W-1:0] i1, i2, y;
  int checks = 0, failures = 0;

  fredkin_mux #(.W(W)) dut (.sel(sel), .i1(i1), .i2(i2), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {sel, i1, i2} = (2 * W + 1)'(i);
      #1;
      checks++;
      if (y !== (sel ? i2 : i1)) begin
        failures++;
        $display("FAIL sel=%b i1=%h i2=%h -> y=%h", sel, i1, i2, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
