// lp_alu16_tb: end-to-end self-check of the 16-bit clock-gated ALU at its
// default size.
//
// Runs random operations through the pins exactly as a user would: hold A,
// B, S2, S1, S0 and Cin, pulse Enable high for 1 to 5 clock edges, drop it,
// and expect y/cout and done three rising edges later (counting the edge
// that first sees Enable low). Results are compared with an independent
// model of the two operation tables. The testbench also counts, through the
// gated clock nets, how many rising edges each unit received: exactly two
// (operand load, result write) on the selected unit's clock and none on
// the other per operation, and none while idle. It counts, and requires
// at least once, each of the twelve operations, a switch between units, a
// carry forwarded over a carry skip block, a back-to-back operation whose
// Enable pulse ends in the write cycle, and a reset in mid-operation. A
// cycle watchdog ends a hung run.
// The operation tables and S2 gating are the published ones; the
// three-edge protocol checked is this design's own.
module lp_alu16_tb
  import alu_pkg::*;
;
  int checks = 0, failures = 0;

  logic        clk = 1'b0, rst = 1'b0, enable = 1'b0;
  logic        s2 = 1'b0, s1 = 1'b0, s0 = 1'b0, cin = 1'b0;
  logic [15:0] a = '0, b = '0, y;
  logic        cout, done;

  lp_alu16 dut (.*);

  always #5 clk = ~clk;

  // Gated clock edges seen by each unit.
  int n_clk_lu = 0, n_clk_au = 0;
  always @(posedge dut.clk_lu) n_clk_lu++;
  always @(posedge dut.clk_au) n_clk_au++;

  // Mechanism counters.
  int n_op [16];
  int n_switch = 0, n_skip = 0, n_b2b = 0, n_rst = 0, n_idle_cycles = 0;

  // Asynchronous reset: raise it after time 0 so that it is an edge.
  initial #1 rst = 1'b1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("%0t %s: got %h exp %h", $time, what, got, exp);
    end
  endtask

  // Independent model: {cout, y} for an operation word.
  function automatic logic [16:0] model(logic [15:0] ta, logic [15:0] tb, logic [3:0] o);
    logic [15:0] nb;
    nb = ~tb;
    if (!o[3]) begin
      case (o[2:1])   // S1 S0
        2'b00: return {1'b0, ta & tb};
        2'b01: return {1'b0, ta ^ tb};
        2'b10: return {1'b0, ta | tb};
        default: return {1'b0, nb};
      endcase
    end
    // Arithmetic: rows ordered (S0, S1, Cin)
    case ({o[1], o[2], o[0]})
      3'b000: return 17'(ta) + 17'(tb);
      3'b001: return 17'(ta) + 17'(tb) + 17'd1;
      3'b010: return 17'(ta) + 17'(nb);
      3'b011: return 17'(ta) + 17'(nb) + 17'd1;
      3'b100: return 17'(ta);
      3'b101: return 17'(ta) + 17'd1;
      3'b110: return 17'(ta) + 17'hffff;
      default: return 17'(ta) + 17'hffff + 17'd1;
    endcase
  endfunction

  // Does a carry of 1 reach a block whose bit pairs all differ?
  function automatic bit skips(logic [15:0] ta, logic [15:0] ty, logic tc);
    int bw [7] = '{1, 2, 3, 4, 3, 2, 1};
    int lsb = 0;
    logic [16:0] s;
    s = 17'(ta) + 17'(ty) + 17'(tc);
    for (int k = 0; k < 7; k++) begin
      bit allp = 1;
      logic c;
      for (int i = lsb; i < lsb + bw[k]; i++) if (ta[i] == ty[i]) allp = 0;
      c = (lsb == 0) ? tc : (s[lsb] ^ ta[lsb] ^ ty[lsb]);
      if (allp && c) return 1;
      lsb += bw[k];
    end
    return 0;
  endfunction

  function automatic logic [15:0] y_operand(logic [15:0] tb, logic [3:0] o);
    case ({o[1], o[2]})
      2'b00: return tb;
      2'b01: return ~tb;
      2'b10: return '0;
      default: return '1;
    endcase
  endfunction

  logic [3:0]  last_op = '0;
  logic [16:0] last_res = '0;

  task automatic set_pins(logic [3:0] o, logic [15:0] ta, logic [15:0] tb);
    {s2, s1, s0, cin} = o;
    a = ta; b = tb;
  endtask

  task automatic count_op(logic [3:0] o, logic [15:0] ta, logic [15:0] tb);
    n_op[o[3] ? o : {o[3:1], 1'b0}]++;
    if (o[3] != last_op[3]) n_switch++;
    if (o[3] && skips(ta, y_operand(tb, o), o[0])) n_skip++;
    last_op = o;
  endtask

  initial begin
    logic [3:0]  o, o2;
    logic [15:0] ta, tb, ta2, tb2;
    logic [16:0] exp, exp2;
    int lu0, au0, hi;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (2) @(negedge clk);
    check("reset y", {14'b0, done, cout, y}, '0);
    rst = 1'b0;
    for (int n = 0; n < 20000; n++) begin
      o  = 4'($urandom);
      ta = 16'($urandom); tb = 16'($urandom);
      if (n % 50 == 7) begin ta = 16'h5555; tb = 16'haaaa; end
      exp = model(ta, tb, o);
      hi = 1 + ($urandom % 5);
      lu0 = n_clk_lu; au0 = n_clk_au;
      @(negedge clk);
      set_pins(o, ta, tb);
      enable = 1'b1;
      repeat (hi) @(negedge clk);
      enable = 1'b0;
      if (n % 97 == 11) begin
        // Reset in the middle of the operation.
        @(posedge clk); @(posedge clk); #1;
        rst = 1'b1; #1;
        check("reset mid-op", {14'b0, done, cout, y}, '0);
        @(negedge clk); rst = 1'b0;
        last_res = '0;
        n_rst++;
        continue;
      end
      // Start edge, then the operand load edge.
      @(posedge clk); #1;
      check("done low after start", 32'(done), 0);
      if (n % 9 == 4) enable = 1'b1;       // seen high at the load edge
      @(posedge clk); #1;
      check("output unchanged during load", {15'b0, cout, y}, 32'(last_res));
      check("done low during load", 32'(done), 0);
      if (n % 9 == 4) begin
        // Second operation whose Enable pulse ends in the write cycle.
        o2  = 4'($urandom);
        ta2 = 16'($urandom); tb2 = 16'($urandom);
        exp2 = model(ta2, tb2, o2);
        @(negedge clk);
        set_pins(o2, ta2, tb2);
        enable = 1'b0;
        @(posedge clk); #1;
        check($sformatf("result op %h a=%h b=%h", o, ta, tb), {15'b0, cout, y}, 32'(exp));
        check("done low on restart", 32'(done), 0);
        check("gated edges lu", n_clk_lu - lu0, o[3] ? 0 : 2);
        check("gated edges au", n_clk_au - au0, o[3] ? 2 : 0);
        count_op(o, ta, tb);
        lu0 = n_clk_lu; au0 = n_clk_au;
        o = o2; ta = ta2; tb = tb2; exp = exp2;
        @(posedge clk); #1;                // load of the second operation
        n_b2b++;
      end
      @(posedge clk); #1;
      check($sformatf("result op %h a=%h b=%h", o, ta, tb), {15'b0, cout, y}, 32'(exp));
      check("done", 32'(done), 1);
      check("gated edges lu", n_clk_lu - lu0, o[3] ? 0 : 2);
      check("gated edges au", n_clk_au - au0, o[3] ? 2 : 0);
      count_op(o, ta, tb);
      last_res = exp;
      // Idle: pins wander, nothing is clocked, the result holds.
      lu0 = n_clk_lu; au0 = n_clk_au;
      repeat ($urandom % 4) begin
        @(negedge clk);
        set_pins(4'($urandom), 16'($urandom), 16'($urandom));
        n_idle_cycles++;
      end
      @(posedge clk); #1;
      check("idle holds result", {15'b0, cout, y}, 32'(exp));
      check("no gated edges while idle", n_clk_lu + n_clk_au - lu0 - au0, 0);
    end
    // Every mechanism must have happened.
    for (int i = 0; i < 16; i++) begin
      if (i < 8 && i[0]) continue;         // logic ops ignore Cin
      checks++;
      if (n_op[i] == 0) begin
        failures++;
        $display("operation %h never ran", i);
      end
    end
    checks++;
    if (n_switch == 0 || n_skip == 0 || n_b2b == 0 || n_rst == 0 || n_idle_cycles == 0) begin
      failures++;
      $display("missing mechanism");
    end
    $display("unit switches %0d, carry skips %0d, back-to-back %0d, resets %0d, idle cycles %0d, lu edges %0d, au edges %0d",
             n_switch, n_skip, n_b2b, n_rst, n_idle_cycles, n_clk_lu, n_clk_au);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
