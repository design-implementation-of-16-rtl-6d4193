// arithmetic_unit_tb: self-check of the arithmetic unit.
//
// Drives the unit's gated clock directly. For every (S0,S1,Cin) row of the
// operation table and random operands, loads A, B and the operation with
// one clock edge (load high) and compares y and cout with an independent
// model of the table (A+B, A+B+1, A+~B, A-B, A, A+1, A-1, A). Also checks
// that an edge with load low keeps the registered operands, and that reset
// clears them. A cycle watchdog ends a hung run with a failure.
// The expected values follow the published arithmetic table, read with S0
// as the upper select bit as printed in its header.
module arithmetic_unit_tb;
  int checks = 0, failures = 0;

  logic        clk_au = 1'b0, rst = 1'b0, load = 1'b0;
  logic [15:0] a = '0, b = '0, y;
  logic        s1 = 1'b0, s0 = 1'b0, cin = 1'b0, cout;

  arithmetic_unit dut (.*);

  always #5 clk_au = ~clk_au;

  // Asynchronous reset: raise it after time 0 so that it is an edge.
  initial #1 rst = 1'b1;

  initial begin
    repeat (100000) @(posedge clk_au);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Operation table, written out row by row.
  function automatic logic [16:0] model(logic [15:0] ta, logic [15:0] tb,
                                        logic ts0, logic ts1, logic tc);
    case ({ts0, ts1, tc})
      3'b000: return 17'(ta) + 17'(tb);            // A + B
      3'b001: return 17'(ta) + 17'(tb) + 17'd1;    // A + B + 1
      3'b010: return 17'(ta) + {1'b0, ~tb};         // A + not B
      3'b011: return 17'(ta) + {1'b0, ~tb} + 17'd1; // A - B
      3'b100: return 17'(ta);                      // A
      3'b101: return 17'(ta) + 17'd1;              // A + 1
      3'b110: return 17'(ta) + 17'hffff;           // A - 1
      default: return 17'(ta) + 17'hffff + 17'd1; // A
    endcase
  endfunction

  task automatic check(string what, logic [16:0] exp);
    checks++;
    if ({cout, y} !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %b_%h exp %h", what, cout, y, exp);
    end
  endtask

  initial begin
    logic [16:0] exp;
    logic [15:0] ta, tb;
    logic [2:0]  opv;
    repeat (2) @(negedge clk_au);
    rst = 1'b0;
    check("after reset", 17'(0));
    for (int n = 0; n < 4000; n++) begin
      ta = 16'($urandom); tb = 16'($urandom);
      if (n < 8) begin ta = 16'h8000; tb = 16'h7fff; end
      opv = 3'(n);
      @(negedge clk_au);
      {s0, s1, cin} = opv; a = ta; b = tb; load = 1'b1;
      @(negedge clk_au);
      load = 1'b0;
      exp = model(ta, tb, opv[2], opv[1], opv[0]);
      check($sformatf("op %b a=%h b=%h", opv, ta, tb), exp);
      // New pins without load must not disturb the result.
      a = ~ta; b = ~tb; {s0, s1, cin} = ~opv;
      @(negedge clk_au);
      check("hold", exp);
      // Named rows of the table.
      if (opv == 3'b011) begin
        checks++;
        if (y !== ta - tb) failures++;
      end
      if (opv == 3'b110) begin
        checks++;
        if (y !== ta - 16'd1) failures++;
      end
    end
    rst = 1'b1;
    #1;
    check("async reset", 17'(0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
