// output_mux_reg_tb: self-check of the output multiplexer and register.
//
// Drives the two gated clocks by hand (one at a time, as the clock gating
// circuit does), with random results from both units. Checks that a
// gated edge with wr high stores the logic result (carry 0) when s2 = 0 and
// the arithmetic result and carry when s2 = 1, whichever gated clock
// carries the edge; that an edge with wr low changes nothing; that nothing
// changes without an edge; and that reset clears the register.
// The S2 selection is the published one; wr and the carry flag are this
// design's own.
module output_mux_reg_tb;
  int checks = 0, failures = 0;

  logic        clk_lu = 1'b0, clk_au = 1'b0, rst = 1'b0, s2 = 1'b0, wr = 1'b0;
  logic [15:0] y_au = '0, y_lu = '0, y;
  logic        cout_au = 1'b0, cout;
  int          cycles = 0;

  output_mux_reg dut (.*);

  // Asynchronous reset: raise it after time 0 so that it is an edge.
  initial #1 rst = 1'b1;

  initial begin
    forever begin
      #10 cycles++;
      if (cycles > 200000) begin
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  task automatic check(string what, logic [16:0] exp);
    checks++;
    if ({cout, y} !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %b_%h exp %h", what, cout, y, exp);
    end
  endtask

  task automatic pulse(logic on_au);
    #2;
    if (on_au) clk_au = 1'b1; else clk_lu = 1'b1;
    #3;
    clk_au = 1'b0; clk_lu = 1'b0;
    #2;
  endtask

  initial begin
    logic [16:0] held;
    #3;
    check("reset", '0);
    rst = 1'b0;
    held = '0;
    for (int n = 0; n < 4000; n++) begin
      logic on_au;
      y_au = 16'($urandom); y_lu = 16'($urandom); cout_au = 1'($urandom);
      s2 = 1'($urandom); wr = (n % 5 != 0);
      on_au = (n % 3 == 0) ? ~s2 : s2;   // sometimes the other gated clock
      #2;
      check("no edge", held);
      pulse(on_au);
      if (wr) held = s2 ? {cout_au, y_au} : {1'b0, y_lu};
      check($sformatf("n=%0d s2=%b wr=%b", n, s2, wr), held);
    end
    rst = 1'b1; #1;
    check("async reset", '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
