// carry_skip_adder_tb: self-check of the 16-bit variable block carry skip
// adder.
//
// Compares {cout, sum} with a + b + cin for directed corner cases (all
// propagate, full carry chains, each block skipping a carry) and 200000
// random operand pairs. Counts how many vectors had at least one block
// forwarding a carry through its skip path, and fails if none did. Time
// watchdog included.
// The block boundaries are the published ones; the vectors are random.
module carry_skip_adder_tb;
  int checks = 0, failures = 0;
  int skip_events = 0;

  logic [15:0] a, b, sum;
  logic        cin, cout;

  carry_skip_adder dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  // Block boundaries as printed for the adder: LSB first.
  localparam int BW [7] = '{1, 2, 3, 4, 3, 2, 1};

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [15:0] ta, input logic [15:0] tb, input logic tc);
    logic [16:0] exp;
    int lsb;
    logic c;
    a = ta; b = tb; cin = tc;
    #1;
    exp = 17'(ta) + 17'(tb) + 17'(tc);
    checks++;
    if ({cout, sum} !== exp) begin
      failures++;
      if (failures < 10) $display("a=%h b=%h cin=%b got %b_%h exp %h", ta, tb, tc, cout, sum, exp);
    end
    // Independent model: did any block receive a carry of 1 while every
    // one of its bit pairs differs (so the skip path forwards it)?
    lsb = 0;
    for (int k = 0; k < 7; k++) begin
      logic allp;
      allp = 1'b1;
      for (int i = lsb; i < lsb + BW[k]; i++) if (ta[i] == tb[i]) allp = 1'b0;
      // carry into bit lsb of the exact sum
      c = (lsb == 0) ? tc : (exp[lsb] ^ ta[lsb] ^ tb[lsb]);
      if (allp && c) begin
        skip_events++;
        break;
      end
      lsb += BW[k];
    end
  endtask

  initial begin
    apply(16'hffff, 16'h0000, 1'b1);
    apply(16'h0000, 16'hffff, 1'b1);
    apply(16'hffff, 16'h0001, 1'b0);
    apply(16'h7fff, 16'h0001, 1'b0);
    apply(16'hffff, 16'hffff, 1'b1);
    apply(16'h0000, 16'h0000, 1'b0);
    apply(16'h5555, 16'haaaa, 1'b1);
    for (int k = 0; k < 16; k++) begin
      apply(16'hffff >> k, 16'h0001, 1'b0);
      apply(16'hffff << k, 16'h0000 | (16'h1 << k), 1'b1);
    end
    for (int n = 0; n < 200000; n++) apply(16'($urandom), 16'($urandom), 1'($urandom));
    checks++;
    if (skip_events == 0) begin
      failures++;
      $display("no carry ever skipped a block");
    end
    $display("skip events: %0d", skip_events);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
