// pp_top: dual-thread calculator processor (two threads, one control unit).
//
// A small multiprocessor for unsigned 8-bit add, subtract and multiply.
// Bytes entered by the user (instructions and numbers) are collected in the
// input buffer and, on 'in_load', moved to the 20-byte shared main memory.
// On 'run' the single control unit fetches the program and hands each
// instruction to thread 0 (accumulator A1) or thread 1 (accumulator A2),
// each with its own temporary registers and ALU. In dual mode fetching
// overlaps execution so both threads work at once; in single mode the
// instructions run one after another, as on a single processor. The
// seven-segment display shows the entered byte count and last byte while a
// program is being entered, and A1:A2 (two hex digits each) once a run has
// started. The block structure follows the design's block diagram; widths,
// encoding, handshakes and the display format are this design's choices.
//
// All inputs are synchronous to 'clk' and one-cycle pulses where they are
// commands ('in_push', 'in_load', 'run'); button debouncing and
// edge detection are outside this module. 'rst' is synchronous, active high.
module pp_top
  import pp_pkg::*;
#(
  parameter int unsigned REFRESH_BITS = 18
) (
  input  logic        clk,
  input  logic        rst,
  // user input
  input  byte_t       in_data,
  input  logic        in_push,
  input  logic        in_load,
  input  logic        run,
  input  logic        dual_mode,
  // seven-segment display
  output logic [3:0]  an,
  output logic [6:0]  seg,
  output logic        dp,
  // status
  output byte_t       acc1,
  output byte_t       acc2,
  output logic        flag1,
  output logic        flag2,
  output logic        running,
  output logic        done,
  output logic        loading,
  output logic        load_done,
  output logic        buf_overflow,
  output logic        buf_full,
  output logic        buf_empty,
  output addr_t       prog_len,
  output logic [15:0] run_cycles,
  output logic [15:0] stall_cycles,
  output logic [7:0]  instr_count,
  output byte_t       ir,
  output logic [NTHREADS-1:0] thread_busy,
  output logic [NTHREADS-1:0] thread_done
);

  // input buffer -> memory
  logic  mem_we;
  addr_t mem_waddr, mem_raddr;
  byte_t mem_wdata, mem_rdata, last_in;
  logic [$clog2(MEM_BYTES+1)-1:0] buf_count;

  // control unit <-> threads
  logic [NTHREADS-1:0] t_start, t_busy, t_done;
  logic                t_clear;
  decoded_t            dec;
  byte_t               imm;
  byte_t               acc  [NTHREADS];
  logic [NTHREADS-1:0] flag;

  logic                show_result;

  input_buffer #(.DEPTH(MEM_BYTES)) u_inbuf (
    .clk, .rst,
    .push(in_push), .din(in_data), .transfer(in_load),
    .full(buf_full), .empty(buf_empty), .count(buf_count),
    .overflow(buf_overflow), .last_in(last_in), .busy(loading),
    .mem_we(mem_we), .mem_addr(mem_waddr), .mem_wdata(mem_wdata),
    .xfer_done(load_done), .prog_len(prog_len)
  );

  main_memory #(.DEPTH(MEM_BYTES)) u_mem (
    .clk, .rst,
    .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rdata)
  );

  control_unit u_ctrl (
    .clk, .rst,
    .run(run && !loading), .dual_mode, .prog_len,
    .mem_raddr, .mem_rdata,
    .clear(t_clear), .start(t_start), .dec, .imm, .busy(t_busy),
    .running, .done, .ir, .run_cycles, .stall_cycles, .instr_count
  );

  for (genvar t = 0; t < NTHREADS; t++) begin : g_thread
    thread_core u_thread (
      .clk, .rst, .clear(t_clear),
      .start(t_start[t]), .dec, .imm,
      .busy(t_busy[t]), .done(t_done[t]),
      .acc(acc[t]), .flag(flag[t])
    );
  end

  assign acc1  = acc[0];
  assign acc2  = acc[1];
  assign flag1 = flag[0];
  assign flag2 = flag[1];
  assign thread_busy = t_busy;
  assign thread_done = t_done;

  // Display source: entry view until a run starts, result view afterwards.
  always_ff @(posedge clk) begin
    if (rst)                          show_result <= 1'b0;
    else if (run && !loading)         show_result <= 1'b1;
    else if (in_push)                 show_result <= 1'b0;
  end

  seg7_display #(.REFRESH_BITS(REFRESH_BITS)) u_disp (
    .clk, .rst,
    .value(show_result ? {acc[0], acc[1]} : {8'(buf_count), last_in}),
    .an, .seg, .dp
  );

endmodule
