// alu_control: control logic of the clock-gated ALU.
//
// Starts an operation on an Enable pulse (high, then low) and sequences it
// through three states on the master clock:
//
//   IDLE  : a clock edge that sees enable low after seeing it high on the
//           edge before captures the operation word {S2,S1,S0,Cin} -> LOAD
//   LOAD  : the selected unit gets one gated clock edge with load high; its
//           operand registers take A and B                          -> WRITE
//   WRITE : the selected unit's gated clock writes the output register,
//           done rises                                              -> IDLE
//           (or straight to LOAD, done staying low, if this edge also
//           sees the end of a new Enable pulse)
//
// gate_en / gate_s2 drive the clock gating circuit; they come from
// registers, so they are settled long before the falling edge at which the
// gating circuit samples them. done stays high until the next start. Reset
// (asynchronous, active high) returns to IDLE with done low. The Enable
// high-then-low rule and the S2 unit select follow the published design;
// the state machine itself is this implementation's own.
module alu_control
  import alu_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    enable,
  input  alu_op_t op,
  output alu_op_t op_q,
  output logic    load,
  output logic    wr,
  output logic    gate_en,
  output logic    gate_s2,
  output logic    done
);

  typedef enum logic [1:0] {
    S_IDLE  = 2'd0,
    S_LOAD  = 2'd1,
    S_WRITE = 2'd2
  } state_e;

  state_e state;
  logic   en_q;
  logic   start;

  // A start needs enable high at one edge and low at the next, so two
  // starts are at least two edges apart and never fall in S_LOAD.
  assign start = en_q && !enable;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      state <= S_IDLE;
      en_q  <= 1'b0;
      op_q  <= '0;
      done  <= 1'b0;
    end else begin
      en_q <= enable;
      unique case (state)
        S_IDLE: if (start) begin
          op_q  <= op;
          done  <= 1'b0;
          state <= S_LOAD;
        end
        S_LOAD:  state <= S_WRITE;
        S_WRITE: begin
          // The result is written at this edge; a start seen at the same
          // edge begins the next operation straight away.
          if (start) begin
            op_q  <= op;
            done  <= 1'b0;
            state <= S_LOAD;
          end else begin
            done  <= 1'b1;
            state <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign load    = (state == S_LOAD);
  assign wr      = (state == S_WRITE);
  assign gate_en = load || wr;
  assign gate_s2 = op_q.s2;

  a_no_start_in_load: assert property (@(posedge clk) disable iff (rst)
                                       state == S_LOAD |-> !start);

endmodule
