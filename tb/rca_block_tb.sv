// rca_block_tb: exhaustive self-check of the ripple carry block.
//
// Instantiates the block at every width the carry skip adder uses (1, 2, 3
// and the default 4) and applies every combination of a, b and cin,
// comparing {cout, sum} with the integer sum a + b + cin. A time watchdog
// ends the run with a failure if it ever hangs.
// The block widths tested are those of the published adder.
module rca_block_tb;
  int checks = 0, failures = 0;

  logic [3:0] a4, b4, s4; logic c4i, c4o;
  logic [2:0] a3, b3, s3; logic c3i, c3o;
  logic [1:0] a2, b2, s2; logic c2i, c2o;
  logic [0:0] a1, b1, s1; logic c1i, c1o;

  rca_block          dut4 (.a(a4), .b(b4), .cin(c4i), .sum(s4), .cout(c4o));
  rca_block #(.W(3)) dut3 (.a(a3), .b(b3), .cin(c3i), .sum(s3), .cout(c3o));
  rca_block #(.W(2)) dut2 (.a(a2), .b(b2), .cin(c2i), .sum(s2), .cout(c2o));
  rca_block #(.W(1)) dut1 (.a(a1), .b(b1), .cin(c1i), .sum(s1), .cout(c1o));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      {c4i, a4, b4} = 9'(v);
      {c3i, a3, b3} = 7'(v);
      {c2i, a2, b2} = 5'(v);
      {c1i, a1, b1} = 3'(v);
      #1;
      checks++;
      if ({c4o, s4} != 5'(a4) + 5'(b4) + 5'(c4i)) begin
        failures++;
        $display("W=4 a=%h b=%h cin=%b got %b%h", a4, b4, c4i, c4o, s4);
      end
      if (v < 128) begin
        checks++;
        if ({c3o, s3} != 4'(a3) + 4'(b3) + 4'(c3i)) failures++;
      end
      if (v < 32) begin
        checks++;
        if ({c2o, s2} != 3'(a2) + 3'(b2) + 3'(c2i)) failures++;
      end
      if (v < 8) begin
        checks++;
        if ({c1o, s1} != 2'(a1) + 2'(b1) + 2'(c1i)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
