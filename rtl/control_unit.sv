// control_unit: the single timing-and-control unit shared by both threads.
//
// One control unit, with the program counter, the instruction register and
// the instruction decoder, fetches every instruction from the shared memory
// and hands it to the thread that owns the named accumulator: A1 is thread 0,
// A2 is thread 1. The threads then execute on their own while the control
// unit goes on fetching. Thread 0 is the front processor in the sense that
// the shared stream is issued from its side; the issuing itself is done by
// this unit. This arrangement (one fetch unit feeding two threads in turn)
// follows the instruction-processing diagram; its cycle-level form is this
// design's own.
//
// Two modes, chosen by 'dual_mode' when 'run' is pulsed:
//   single (0) : one instruction at a time. After an instruction is issued
//                the unit waits until its thread has finished before it
//                fetches the next, so the two threads act as one processor.
//   dual   (1) : fetch overlaps execution. The next instruction is fetched
//                while earlier ones execute; issue stalls only while the
//                target thread is still busy.
// The results are the same in both modes; only the time differs.
//
// The instruction decoder looks at the byte coming out of memory, and the
// instruction register and the decoded word are latched together at the
// end of DECODE. That saves the cycle a decoder placed behind the
// instruction register would cost.
//
// Per instruction: DECODE (IR and decoded word latched, PC+1; a NOP ends
// here) -> [IMM (immediate latched, PC+1)] -> ISSUE (start pulse to the
// thread; held while that thread is busy, counted in 'stall_cycles').
// The memory read is synchronous, so the address of the byte needed next is
// presented one cycle early: during DECODE it is PC+1, otherwise PC. In dual
// mode the ISSUE cycle therefore already fetches the next instruction and
// the unit goes straight on to its DECODE: an INC takes 2 cycles, an
// instruction with an immediate 3, while a thread needs 4 (start cycle plus
// 3 busy cycles), so the two threads execute at the same time and a
// thread named twice in a row makes issue stall. In single mode ISSUE is
// followed by WAIT until both threads are idle and by a fresh FETCH.
// After the last byte (PC >= prog_len) the unit waits for both threads to go
// idle and raises 'done', which stays high until the next 'run'.
// 'run_cycles' counts the cycles from the cycle after 'run' to 'done', the
// measure of execution time. A 'run' is ignored while running. Accepting a
// 'run' pulses 'clear', which zeroes both accumulators and flags, so each
// program starts from zero (this design's choice).
module control_unit
  import pp_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              run,
  input  logic              dual_mode,
  input  addr_t             prog_len,
  // shared memory read port
  output addr_t             mem_raddr,
  input  byte_t             mem_rdata,
  // thread issue
  output logic              clear,   // pulse when a run starts: threads clear A
  output logic [NTHREADS-1:0] start,
  output decoded_t          dec,
  output byte_t             imm,
  input  logic [NTHREADS-1:0] busy,
  // status
  output logic              running,
  output logic              done,
  output byte_t             ir,
  output logic [15:0]       run_cycles,
  output logic [15:0]       stall_cycles,
  output logic [7:0]        instr_count
);

  typedef enum logic [2:0] {
    S_IDLE, S_FETCH, S_DECODE, S_IMM, S_ISSUE, S_WAIT, S_DRAIN
  } state_e;

  state_e   state;
  addr_t    pc;
  logic     dual_q;
  decoded_t dec_w;
  logic     target_free;

  instr_decoder u_dec (.ir(mem_rdata), .dec(dec_w));

  // In DECODE the address already points at the immediate byte.
  assign mem_raddr   = (state == S_DECODE) ? pc + 1'b1 : pc;
  assign target_free = !busy[dec.reg_sel];
  assign running     = (state != S_IDLE);
  assign clear       = (state == S_IDLE) && run;

  always_comb begin
    start = '0;
    if (state == S_ISSUE && target_free) start[dec.reg_sel] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state        <= S_IDLE;
      pc           <= '0;
      dual_q       <= 1'b0;
      dec          <= '0;
      ir           <= '0;
      imm          <= '0;
      done         <= 1'b0;
      run_cycles   <= '0;
      stall_cycles <= '0;
      instr_count  <= '0;
    end else begin
      if (running) run_cycles <= run_cycles + 1'b1;
      unique case (state)
        S_IDLE: if (run) begin
          pc           <= '0;
          dual_q       <= dual_mode;
          done         <= 1'b0;
          run_cycles   <= '0;
          stall_cycles <= '0;
          instr_count  <= '0;
          state        <= (prog_len == '0) ? S_DRAIN : S_FETCH;
        end
        S_FETCH: state <= S_DECODE;
        S_DECODE: begin
          ir          <= mem_rdata;
          dec         <= dec_w;
          pc          <= pc + 1'b1;
          instr_count <= instr_count + 1'b1;
          if (!dec_w.valid)      state <= (pc + 1'b1 >= prog_len) ? S_DRAIN : S_DECODE;
          else if (dec_w.has_imm) state <= S_IMM;
          else                    state <= S_ISSUE;
        end
        S_IMM: begin
          imm   <= mem_rdata;
          pc    <= pc + 1'b1;
          state <= S_ISSUE;
        end
        S_ISSUE: begin
          if (!target_free)  stall_cycles <= stall_cycles + 1'b1;
          else if (!dual_q)  state <= S_WAIT;
          else               state <= (pc >= prog_len) ? S_DRAIN : S_DECODE;
        end
        S_WAIT: if (busy == '0) state <= (pc >= prog_len) ? S_DRAIN : S_FETCH;
        S_DRAIN: if (busy == '0) begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // In single mode no instruction may be issued while a thread is busy.
  assert property (@(posedge clk) disable iff (rst) (|start && !dual_q) |-> (busy == '0))
    else $error("control_unit: overlap in single mode");
  assert property (@(posedge clk) disable iff (rst) $onehot0(start))
    else $error("control_unit: two starts in one cycle");

endmodule
