// alu_control_tb: self-check of the ALU control logic.
//
// Gives Enable pulses of random length (1 to 20 clock edges high) with
// random operation words and checks the exact sequence after the first
// rising edge that sees Enable low: that edge captures the operation
// (op_q) and the next cycle is the operand load (load, gate_en, gate_s2 =
// S2); the cycle after is the write (wr, gate_en); then the controller is
// idle with done high and no gated clock requested. While Enable is held
// high nothing may start. Also checks a back-to-back start whose Enable
// pulse ends during the write cycle, and an asynchronous reset in the
// middle of an operation. A cycle watchdog ends a hung run.
// The Enable high-then-low rule is the published one; the cycle-exact
// sequence checked is this design's own.
module alu_control_tb
  import alu_pkg::*;
;
  int checks = 0, failures = 0;
  int n_ops = 0, n_b2b = 0, n_rst = 0;

  logic    clk = 1'b0, rst = 1'b0, enable = 1'b0;
  alu_op_t op = '0, op_q;
  logic    load, wr, gate_en, gate_s2, done;

  alu_control dut (.*);

  always #5 clk = ~clk;

  // Asynchronous reset: raise it after time 0 so that it is an edge.
  initial #1 rst = 1'b1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_sig(string what, logic [8:0] got, logic [8:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%0t %s: got %b exp %b", $time, what, got, exp);
    end
  endtask

  // Pack of observed outputs: {load, wr, gate_en, gate_s2, done, op_q}.
  function automatic logic [8:0] obs();
    return {load, wr, gate_en, gate_s2, done, op_q};
  endfunction

  // Checks the three cycles after the start edge for operation o.
  task automatic expect_sequence(alu_op_t o, bit b2b_next);
    // Start edge: the operation is captured, next cycle loads.
    @(posedge clk); #1;
    expect_sig("load cycle", obs(), {1'b1, 1'b0, 1'b1, o.s2, 1'b0, o});
    op = alu_op_t'($urandom);           // pins may change now
    if (b2b_next) begin
      @(negedge clk); enable = 1'b1;
      @(negedge clk); enable = 1'b0;
    end
    @(posedge clk); #1;
    if (!b2b_next)
      expect_sig("write cycle", obs(), {1'b0, 1'b1, 1'b1, o.s2, 1'b0, o});
    n_ops++;
  endtask

  initial begin
    alu_op_t o, o2;
    int hi;
    @(negedge clk);
    @(negedge clk);
    expect_sig("reset", obs(), '0);
    rst = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      o  = alu_op_t'($urandom);
      hi = 1 + ($urandom % 20);
      @(negedge clk);
      op = o; enable = 1'b1;
      repeat (hi) begin
        @(negedge clk);
        // Nothing starts while Enable stays high.
        expect_sig("enable held high", {6'b0, load, wr, gate_en}, 9'b0);
      end
      enable = 1'b0;
      if (n % 10 == 3) begin
        // Back-to-back: a second pulse ends in the write cycle.
        expect_sequence(o, 1'b1);
        o2 = op;
        expect_sig("write + restart", obs(), {1'b1, 1'b0, 1'b1, o2.s2, 1'b0, o2});
        n_b2b++;
        @(posedge clk); #1;
        expect_sig("second write", obs(), {1'b0, 1'b1, 1'b1, o2.s2, 1'b0, o2});
        o = o2;
      end else if (n % 37 == 5) begin
        // Reset in the middle of an operation.
        @(posedge clk); #1;
        rst = 1'b1; #1;
        expect_sig("reset mid-op", obs(), '0);
        @(negedge clk); rst = 1'b0;
        n_rst++;
        continue;
      end else begin
        expect_sequence(o, 1'b0);
      end
      @(posedge clk); #1;
      expect_sig("done", obs(), {1'b0, 1'b0, 1'b0, o.s2, 1'b1, o});
      repeat ($urandom % 3) begin
        @(posedge clk); #1;
        expect_sig("idle", obs(), {1'b0, 1'b0, 1'b0, o.s2, 1'b1, o});
      end
    end
    checks++;
    if (n_ops == 0 || n_b2b == 0 || n_rst == 0) failures++;
    $display("operations %0d back-to-back %0d resets %0d", n_ops, n_b2b, n_rst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
