// thread_core: one execution thread (accumulator, temporary registers, ALU).
//
// The datapath follows the block diagram of one thread: an accumulator and an
// input temporary register (TREG) feed the ALU, whose result goes to an
// output temporary register before it is written back to the accumulator.
// The steps follow the INC flowchart: after the control unit has fetched and
// decoded an instruction, TREG is loaded (with 1 for INC, with the immediate
// otherwise), the ALU computes A op TREG, and the result is moved to A.
//
// Timing: a one-cycle 'start' with 'dec'/'imm' is accepted when 'busy' is low.
//   cycle 0 (start) : operation and immediate latched
//   cycle 1 (LOAD)  : TREG <= 1 (INC) or the immediate
//   cycle 2 (EXEC)  : OUTREG <= ALU(A, TREG), flag computed
//   cycle 3 (WB)    : A <= OUTREG, flag register updated, 'done' pulses
// 'busy' is high in LOAD, EXEC and WB, so a thread accepts a new
// instruction at most every fourth cycle. The three-step split and the flag register are this
// design's choices; the description gives the steps but not their cycles.
// Of the decoded word only 'treg_one' and 'alu_op' matter here; the control
// unit uses the other fields.
// Reset clears A, TREG, OUTREG and the flag; 'clear' (given by the control
// unit when a program starts) clears A and the flag, so every program
// starts from zero accumulators.
module thread_core
  import pp_pkg::*;
(
  input  logic     clk,
  input  logic     rst,
  input  logic     clear,   // start of a program: A and flag to 0 (thread idle)
  input  logic     start,
  input  decoded_t dec,
  input  byte_t    imm,
  output logic     busy,
  output logic     done,    // one-cycle pulse when A has been written
  output byte_t    acc,
  output logic     flag     // carry / borrow / overflow of the last operation
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_EXEC, S_WB} state_e;

  state_e  state;
  alu_op_e op_q;
  byte_t   treg, outreg, alu_y, imm_q;
  logic    one_q, alu_flag, out_flag;

  alu u_alu (.op(op_q), .a(acc), .b(treg), .y(alu_y), .flag(alu_flag));

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      op_q     <= ALU_PASS;
      treg     <= '0;
      imm_q    <= '0;
      one_q    <= 1'b0;
      outreg   <= '0;
      out_flag <= 1'b0;
      acc      <= '0;
      flag     <= 1'b0;
    end else if (clear) begin
      acc   <= '0;
      flag  <= 1'b0;
      state <= S_IDLE;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          imm_q <= imm;
          one_q <= dec.treg_one;
          op_q  <= dec.alu_op;
          state <= S_LOAD;
        end
        S_LOAD: begin
          treg  <= one_q ? byte_t'(1) : imm_q;
          state <= S_EXEC;
        end
        S_EXEC: begin
          outreg   <= alu_y;
          out_flag <= alu_flag;
          state    <= S_WB;
        end
        S_WB: begin
          acc   <= outreg;
          flag  <= out_flag;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
  assign done = (state == S_WB);

  // A start while busy would be lost: the control unit must never do it.
  assert property (@(posedge clk) disable iff (rst) start |-> !busy)
    else $error("thread_core: start while busy");

endmodule
