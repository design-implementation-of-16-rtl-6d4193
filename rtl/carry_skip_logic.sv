// carry_skip_logic: skip path of one carry skip adder block.
//
// The block propagate bit p is the AND of the bitwise XOR of the block's
// operand bits. When p is 1 every bit of the block would pass its carry on,
// so the block carry-in goes straight to the block carry-out without waiting
// for the ripple chain; otherwise the ripple adder's own carry-out is used.
// Combinational. The XOR/AND propagate bit follows the published design; the
// 2:1 multiplexer form of the skip is this implementation's choice.
module carry_skip_logic #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  input  logic         rca_cout,
  output logic         p,
  output logic         cout
);

  assign p    = &(a ^ b);
  assign cout = p ? cin : rca_cout;

endmodule
