// logic_unit_tb: self-check of the logic unit.
//
// Drives the unit's gated clock directly, loads random operands with each
// select code (S1,S0) and compares y with AND, XOR, OR and NOT B. Checks
// that an edge with load low keeps the registered operands and that reset
// clears them. A cycle watchdog ends a hung run with a failure.
// The expected values follow the published logic table.
module logic_unit_tb;
  int checks = 0, failures = 0;

  logic        clk_lu = 1'b0, rst = 1'b0, load = 1'b0;
  logic [15:0] a = '0, b = '0, y;
  logic        s1 = 1'b0, s0 = 1'b0;

  logic_unit dut (.*);

  always #5 clk_lu = ~clk_lu;

  // Asynchronous reset: raise it after time 0 so that it is an edge.
  initial #1 rst = 1'b1;

  initial begin
    repeat (100000) @(posedge clk_lu);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [15:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %h exp %h", what, y, exp);
    end
  endtask

  initial begin
    logic [15:0] ta, tb, exp;
    logic [1:0]  sel;
    repeat (2) @(negedge clk_lu);
    rst = 1'b0;
    check("after reset", '0);
    for (int n = 0; n < 4000; n++) begin
      ta = 16'($urandom); tb = 16'($urandom); sel = 2'(n);
      @(negedge clk_lu);
      {s1, s0} = sel; a = ta; b = tb; load = 1'b1;
      @(negedge clk_lu);
      load = 1'b0;
      case (sel)
        2'b00: exp = ta & tb;
        2'b01: exp = ta ^ tb;
        2'b10: exp = ta | tb;
        default: exp = ~tb;
      endcase
      check($sformatf("sel %b a=%h b=%h", sel, ta, tb), exp);
      a = ~ta; b = ~tb; {s1, s0} = ~sel;
      @(negedge clk_lu);
      check("hold", exp);
    end
    rst = 1'b1;
    #1;
    check("async reset", '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
