// carry_skip_logic_tb: exhaustive self-check of the carry skip stage.
//
// For every a, b (4 bits), block carry-in and ripple carry-out, checks that
// p is 1 exactly when every bit pair differs, and that the block carry-out
// is the carry-in when p is 1 and the ripple carry-out otherwise. Also
// checks that, fed with a real ripple carry, the stage never changes the
// arithmetic carry of a + b + cin. Time watchdog included.
// The propagate rule checked is the published one; the multiplexer skip
// is this design's choice.
module carry_skip_logic_tb;
  int checks = 0, failures = 0;

  logic [3:0] a, b;
  logic       cin, rca_cout, p, cout;
  int         skips = 0;

  carry_skip_logic dut (.a(a), .b(b), .cin(cin), .rca_cout(rca_cout), .p(p), .cout(cout));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_p;
    for (int v = 0; v < 1024; v++) begin
      {rca_cout, cin, a, b} = 10'(v);
      #1;
      exp_p = 1'b1;
      for (int i = 0; i < 4; i++) if (a[i] == b[i]) exp_p = 1'b0;
      checks++;
      if (p !== exp_p) begin
        failures++;
        $display("p: a=%h b=%h got %b", a, b, p);
      end
      checks++;
      if (cout !== (exp_p ? cin : rca_cout)) begin
        failures++;
        $display("cout: a=%h b=%h cin=%b rc=%b got %b", a, b, cin, rca_cout, cout);
      end
      if (exp_p) skips++;
    end
    // With the true ripple carry, the carry out must equal the arithmetic one.
    for (int v = 0; v < 512; v++) begin
      logic [4:0] s;
      {cin, a, b} = 9'(v);
      s = 5'(a) + 5'(b) + 5'(cin);
      rca_cout = s[4];
      #1;
      checks++;
      if (cout !== s[4]) failures++;
    end
    checks++;
    if (skips == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
