// clock_gating: derives the two unit clocks CLK_LU and CLK_AU from the
// master clock.
//
// The published circuit ANDs the clock with inverted S2 for the logic unit
// and with S2 for the arithmetic unit, so only one unit clock runs at a time
// (S2 = 0: logic unit, S2 = 1: arithmetic unit). This implementation adds a
// second qualifier, en, so that neither unit is clocked while the ALU is
// idle, and captures both AND-gate enables in flip-flops on the falling
// clock edge: the enables then only change while the clock is low and the
// gated clocks cannot glitch. Timing: s2 and en must be settled before the
// falling edge that precedes the rising edge they are meant to gate; the
// gated clock then follows the master clock high phase for that cycle.
// Reset (asynchronous, active high) turns both gated clocks off.
module clock_gating (
  input  logic clk,
  input  logic rst,
  input  logic s2,
  input  logic en,
  output logic clk_lu,
  output logic clk_au
);

  logic en_lu_q, en_au_q;

  always_ff @(negedge clk or posedge rst) begin
    if (rst) begin
      en_lu_q <= 1'b0;
      en_au_q <= 1'b0;
    end else begin
      en_lu_q <= en & ~s2;
      en_au_q <= en &  s2;
    end
  end

  assign clk_lu = clk & en_lu_q;
  assign clk_au = clk & en_au_q;

  // Only one unit clock may be active at a time.
  a_one_unit_clock: assert property (@(posedge clk) disable iff (rst) !(en_lu_q && en_au_q));

endmodule
