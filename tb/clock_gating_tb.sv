// clock_gating_tb: self-check of the clock gating circuit.
//
// Runs a free master clock and changes s2 and en at random just after each
// rising edge (while the clock is high). Checks, cycle by cycle, that during
// the next high phase CLK_LU follows the clock exactly when en=1 and s2=0,
// CLK_AU exactly when en=1 and s2=1, that a change of s2/en while the clock
// is high does not reach the gated clocks until the next cycle (no glitch),
// that both are low while the clock is low, and that the number of rising
// edges on each gated clock equals the number of cycles that asked for it.
// Reset must stop both clocks. A cycle watchdog ends a hung run.
// The S2 to unit-clock mapping is the published one; the en qualifier and
// its falling-edge capture are this design's own.
module clock_gating_tb;
  int checks = 0, failures = 0;

  logic clk = 1'b0, rst = 1'b0, s2 = 1'b0, en = 1'b0;
  logic clk_lu, clk_au;
  int   n_lu = 0, n_au = 0, exp_n_lu = 0, exp_n_au = 0;

  clock_gating dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk_lu) n_lu++;
  always @(posedge clk_au) n_au++;

  // Asynchronous reset: raise it after time 0 so that it is an edge.
  initial #1 rst = 1'b1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %b exp %b", $time, what, got, exp);
    end
  endtask

  initial begin
    logic exp_lu, exp_au;
    repeat (3) @(posedge clk);
    check("reset lu", clk_lu, 1'b0);
    check("reset au", clk_au, 1'b0);
    @(posedge clk); #1;
    rst = 1'b0;
    exp_lu = 1'b0; exp_au = 1'b0;
    for (int n = 0; n < 5000; n++) begin
      // Apply new controls during the high phase.
      s2 = 1'($urandom); en = (n % 7 == 0) ? 1'b0 : 1'($urandom);
      #1;
      check("no glitch lu", clk_lu, exp_lu);
      check("no glitch au", clk_au, exp_au);
      @(negedge clk); #1;
      check("low lu", clk_lu, 1'b0);
      check("low au", clk_au, 1'b0);
      exp_lu = en & ~s2;
      exp_au = en & s2;
      if (exp_lu) exp_n_lu++;
      if (exp_au) exp_n_au++;
      @(posedge clk); #1;
      check("high lu", clk_lu, exp_lu);
      check("high au", clk_au, exp_au);
      check("one clock at a time", clk_lu & clk_au, 1'b0);
    end
    checks++;
    if (n_lu != exp_n_lu || n_au != exp_n_au) begin
      failures++;
      $display("edge counts lu %0d/%0d au %0d/%0d", n_lu, exp_n_lu, n_au, exp_n_au);
    end
    checks++;
    if (exp_n_lu == 0 || exp_n_au == 0) failures++;
    // Asynchronous reset in the middle of a gated high phase.
    en = 1'b1; s2 = 1'b1;
    @(posedge clk); #1;
    check("au running", clk_au, 1'b1);
    rst = 1'b1; #1;
    check("reset stops au", clk_au, 1'b0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
