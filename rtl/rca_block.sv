// rca_block: W-bit ripple carry adder, one block of the carry skip adder.
//
// A chain of full adders: bit i adds a[i], b[i] and the carry from bit i-1,
// the first bit takes cin and the last carry leaves as cout. Purely
// combinational. Block widths of 1 to 4 bits are used by carry_skip_adder;
// the ripple structure follows the published design, the full-adder
// equations are the textbook ones.
module rca_block #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
  end

  assign cout = c[W];

endmodule
