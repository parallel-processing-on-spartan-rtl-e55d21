// input_buffer: collects the bytes a user enters and moves them to memory.
//
// The calculator's input (numbers and commands) is first stored in this
// buffer and then transferred to the shared main memory, as the design
// description says. It is a first-in first-out queue of DEPTH bytes
// (default: the memory size, so a full buffer fills the memory).
//
// Interface and timing (this design's choices; the description gives only
// the function):
//   push/din  : one byte is stored per cycle that 'push' is high. A push
//               into a full buffer is dropped and sets the sticky 'overflow'.
//   transfer  : a one-cycle pulse starts the move; from the next cycle one
//               byte per cycle is written to memory address 0, 1, 2, ...
//               ('mem_we', 'mem_addr', 'mem_wdata'). Pushes are ignored
//               while moving. When the queue is empty, 'xfer_done' pulses
//               for one cycle and 'prog_len' holds the number of bytes moved.
//   last_in   : the byte most recently pushed, for the display.
module input_buffer
  import pp_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_BYTES
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  push,
  input  byte_t din,
  input  logic  transfer,
  output logic  full,
  output logic  empty,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic  overflow,
  output byte_t last_in,
  output logic  busy,
  output logic  mem_we,
  output addr_t mem_addr,
  output byte_t mem_wdata,
  output logic  xfer_done,
  output addr_t prog_len
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  byte_t         q [DEPTH];
  logic [PW-1:0] rd_ptr, wr_ptr;
  logic          moving;
  addr_t         waddr;
  logic          do_push, do_pop;

  assign full    = (count == CW'(DEPTH));
  assign empty   = (count == '0);
  assign busy    = moving;
  assign do_push = push && !moving && !full;
  assign do_pop  = moving && !empty;

  assign mem_we    = do_pop;
  assign mem_addr  = waddr;
  assign mem_wdata = q[rd_ptr];

  function automatic logic [PW-1:0] inc_ptr(logic [PW-1:0] p);
    return (int'(p) == int'(DEPTH) - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      last_in   <= '0;
      moving    <= 1'b0;
      waddr     <= '0;
      xfer_done <= 1'b0;
      prog_len  <= '0;
      for (int i = 0; i < int'(DEPTH); i++) q[i] <= '0;
    end else begin
      xfer_done <= 1'b0;
      if (do_push) begin
        q[wr_ptr] <= din;
        wr_ptr    <= inc_ptr(wr_ptr);
        last_in   <= din;
      end
      if (push && !moving && full) overflow <= 1'b1;
      if (do_pop) begin
        rd_ptr <= inc_ptr(rd_ptr);
        waddr  <= waddr + 1'b1;
      end
      unique case ({do_push, do_pop})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (!moving && transfer) begin
        moving <= 1'b1;
        waddr  <= '0;
      end else if (moving && empty) begin
        moving    <= 1'b0;
        xfer_done <= 1'b1;
        prog_len  <= waddr;
      end
    end
  end

endmodule
