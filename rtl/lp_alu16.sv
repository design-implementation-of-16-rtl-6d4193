// lp_alu16: 16-bit low power ALU with clock gating (top level).
//
// The ALU has an arithmetic unit (eight operations built on a variable
// block length carry skip adder) and a logic unit (AND, XOR, OR, NOT B).
// Each unit keeps its operands in registers on its own gated clock, and the
// unit select S2 lets only one of the two clocks run (S2 = 0 logic unit,
// S2 = 1 arithmetic unit); while idle neither runs. The selected result goes
// through the output multiplexer into the output register, which is clocked
// by whichever gated clock is active.
//
// Operation: hold A, B, S2, S1, S0 and Cin, raise enable for at least one
// clock edge and drop it. The first rising edge that sees enable low
// captures the operation, the next one loads A and B into the selected
// unit, and the one after that writes y/cout and raises done (result three
// rising edges after the one that saw enable low, counting that one as
// the first). A and B must stay valid until done. rst (asynchronous,
// active high) clears every register. The unit structure, operation tables,
// S2 gating and output register follow the published design; the control
// sequence, done and the carry output are this implementation's own.
module lp_alu16
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             enable,
  input  logic             s2,
  input  logic             s1,
  input  logic             s0,
  input  logic             cin,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] y,
  output logic             cout,
  output logic             done
);

  alu_op_t          op_q;
  logic             load, wr, gate_en, gate_s2;
  logic             clk_lu, clk_au;
  logic [WIDTH-1:0] y_au, y_lu;
  logic             cout_au;

  alu_control u_ctrl (
    .clk    (clk),
    .rst    (rst),
    .enable (enable),
    .op     ('{s2: s2, s1: s1, s0: s0, cin: cin}),
    .op_q   (op_q),
    .load   (load),
    .wr     (wr),
    .gate_en(gate_en),
    .gate_s2(gate_s2),
    .done   (done)
  );

  clock_gating u_cg (
    .clk   (clk),
    .rst   (rst),
    .s2    (gate_s2),
    .en    (gate_en),
    .clk_lu(clk_lu),
    .clk_au(clk_au)
  );

  arithmetic_unit #(.WIDTH(WIDTH)) u_au (
    .clk_au(clk_au),
    .rst   (rst),
    .load  (load),
    .a     (a),
    .b     (b),
    .s1    (op_q.s1),
    .s0    (op_q.s0),
    .cin   (op_q.cin),
    .y     (y_au),
    .cout  (cout_au)
  );

  logic_unit #(.WIDTH(WIDTH)) u_lu (
    .clk_lu(clk_lu),
    .rst   (rst),
    .load  (load),
    .a     (a),
    .b     (b),
    .s1    (op_q.s1),
    .s0    (op_q.s0),
    .y     (y_lu)
  );

  output_mux_reg #(.WIDTH(WIDTH)) u_out (
    .clk_lu (clk_lu),
    .clk_au (clk_au),
    .rst    (rst),
    .s2     (op_q.s2),
    .wr     (wr),
    .y_au   (y_au),
    .cout_au(cout_au),
    .y_lu   (y_lu),
    .y      (y),
    .cout   (cout)
  );

endmodule
