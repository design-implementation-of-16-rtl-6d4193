// arithmetic_unit: the ALU's arithmetic side, on its own gated clock.
//
// Operands A, B and the operation bits S1, S0 and Cin are captured in
// registers clocked by CLK_AU when load is high, so the unit's registers
// only toggle when an arithmetic operation is started. From the registered
// values the unit forms Y and adds A + Y + Cin on the variable block length
// carry skip adder. With (S0,S1) as printed in the operation table:
//
//   S0 S1 | Y       | Cin=0  | Cin=1
//   0  0  | B       | A+B    | A+B+1
//   0  1  | not B   | A+~B   | A-B
//   1  0  | 0       | A      | A+1
//   1  1  | all 1s  | A-1    | A
//
// Interface: y and cout are combinational from the operand registers and
// are valid one gated edge after load. Reset (asynchronous, active high)
// clears the registers. The operation table and the register-on-gated-clock
// arrangement follow the published design; the load strobe and the choice
// of S0 as the upper select bit (the table's printed column order) are this
// implementation's reading.
module arithmetic_unit
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk_au,
  input  logic             rst,
  input  logic             load,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             s1,
  input  logic             s0,
  input  logic             cin,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic [WIDTH-1:0] a_q, b_q;
  logic             s1_q, s0_q, cin_q;
  logic [WIDTH-1:0] y_in;

  always_ff @(posedge clk_au or posedge rst) begin
    if (rst) begin
      a_q   <= '0;
      b_q   <= '0;
      s1_q  <= 1'b0;
      s0_q  <= 1'b0;
      cin_q <= 1'b0;
    end else if (load) begin
      a_q   <= a;
      b_q   <= b;
      s1_q  <= s1;
      s0_q  <= s0;
      cin_q <= cin;
    end
  end

  always_comb begin
    unique case ({s0_q, s1_q})
      2'b00:   y_in = b_q;
      2'b01:   y_in = ~b_q;
      2'b10:   y_in = '0;
      default: y_in = '1;
    endcase
  end

  carry_skip_adder #(.WIDTH(WIDTH)) u_csa (
    .a   (a_q),
    .b   (y_in),
    .cin (cin_q),
    .sum (y),
    .cout(cout)
  );

endmodule
