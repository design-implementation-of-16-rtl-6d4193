// logic_unit: the ALU's logic side, on its own gated clock.
//
// Operands A, B and the select bits S1, S0 are captured in registers clocked
// by CLK_LU when load is high; the result is combinational from them:
//
//   S1 S0 | result
//   0  0  | A AND B
//   0  1  | A XOR B
//   1  0  | A OR B
//   1  1  | NOT B
//
// Interface: y is valid one gated edge after load. Reset (asynchronous,
// active high) clears the registers. The four operations and the gated
// operand registers follow the published design; the load strobe is this
// implementation's own.
module logic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk_lu,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s1,
  input  logic             s0,
  output logic [WIDTH-1:0] y
);

  logic [WIDTH-1:0] a_q, b_q;
  logic             s1_q, s0_q;

  always_ff @(posedge clk_lu or posedge rst) begin
    if (rst) begin
      a_q  <= '0;
      b_q  <= '0;
      s1_q <= 1'b0;
      s0_q <= 1'b0;
    end else if (load) begin
      a_q  <= a;
      b_q  <= b;
      s1_q <= s1;
      s0_q <= s0;
    end
  end

  always_comb begin
    unique case ({s1_q, s0_q})
      2'b00:   y = a_q & b_q;
      2'b01:   y = a_q ^ b_q;
      2'b10:   y = a_q | b_q;
      default: y = ~b_q;
    endcase
  end

endmodule
