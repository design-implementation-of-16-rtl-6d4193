// output_mux_reg: output multiplexer and output register of the ALU.
//
// The multiplexer picks the logic unit result when s2 = 0 and the
// arithmetic unit result when s2 = 1. The output register is clocked by
// either gated clock (the OR of CLK_LU and CLK_AU) and takes the selected
// value at an edge where wr is high; other gated edges leave it unchanged.
// It also keeps the arithmetic carry (cleared by a logic operation).
// Interface: y and cout change only at a gated rising edge with wr high, or
// on reset (asynchronous, active high, clears both). The mux and the
// register on the gated clocks follow the published design; the write
// strobe and the carry flag are this implementation's own.
module output_mux_reg
  import alu_pkg::*;
#(
  parameter int unsigned WIDTH = alu_pkg::ALU_WIDTH
) (
  input  logic             clk_lu,
  input  logic             clk_au,
  input  logic             rst,
  input  logic             s2,
  input  logic             wr,
  input  logic [WIDTH-1:0] y_au,
  input  logic             cout_au,
  input  logic [WIDTH-1:0] y_lu,
  output logic [WIDTH-1:0] y,
  output logic             cout
);

  logic             clk_out;
  logic [WIDTH-1:0] y_mux;
  logic             c_mux;

  assign clk_out = clk_lu | clk_au;

  always_comb begin
    if (unit_e'(s2) == UNIT_AU) begin
      y_mux = y_au;
      c_mux = cout_au;
    end else begin
      y_mux = y_lu;
      c_mux = 1'b0;
    end
  end

  always_ff @(posedge clk_out or posedge rst) begin
    if (rst) begin
      y    <= '0;
      cout <= 1'b0;
    end else if (wr) begin
      y    <= y_mux;
      cout <= c_mux;
    end
  end

endmodule
