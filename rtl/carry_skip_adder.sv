// carry_skip_adder: variable block length carry skip adder.
//
// The WIDTH-bit operands are cut into NB ripple carry blocks whose widths
// BW are listed from the least significant end (default 1,2,3,4,3,2,1 bits,
// i.e. bit 0; bits 2..1; 5..3; 9..6; 12..10; 14..13; 15). Each block is an
// rca_block; its carry-out passes through a carry_skip_logic stage, which
// bypasses the block when all its bits propagate. The skip-stage output of
// block k (carry C_k) is the carry-in of block k+1; the last one is cout.
// Purely combinational. Block widths and structure follow the published
// design; parameterising the widths is this implementation's own.
module carry_skip_adder
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH,
  parameter int unsigned NB    = alu_pkg::CSA_NB,
  parameter int unsigned BW [NB] = alu_pkg::CSA_BW
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  // Least significant bit of block k.
  function automatic int unsigned lsb_of(int unsigned k);
    int unsigned s = 0;
    for (int unsigned j = 0; j < k; j++) s += BW[j];
    return s;
  endfunction

  // c[k] is the carry into block k; c[NB] is the adder's carry out.
  logic [NB:0] c;
  assign c[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    localparam int unsigned L = lsb_of(k);
    localparam int unsigned W = BW[k];
    logic rca_c;

    rca_block #(.W(W)) u_rca (
      .a   (a[L +: W]),
      .b   (b[L +: W]),
      .cin (c[k]),
      .sum (sum[L +: W]),
      .cout(rca_c)
    );

    carry_skip_logic #(.W(W)) u_skip (
      .a       (a[L +: W]),
      .b       (b[L +: W]),
      .cin     (c[k]),
      .rca_cout(rca_c),
      .p       (),
      .cout    (c[k+1])
    );
  end

  assign cout = c[NB];

  // The blocks must tile the operand exactly.
  if (lsb_of(NB) != WIDTH) begin : g_bad_blocks
    $error("carry_skip_adder: block widths do not add up to WIDTH");
  end

endmodule
