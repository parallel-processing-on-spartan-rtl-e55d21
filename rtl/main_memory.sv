// main_memory: the shared program/data memory.
//
// DEPTH bytes (20 by default, the size given for the shared memory) of
// 8 bits, with one synchronous write port, used by the input buffer to load
// the program, and one synchronous read port, used by the control unit to
// fetch instructions for both threads. Read data appear the cycle after the
// address. The port arrangement is this design's choice. Reset clears every
// byte to 0 (NOP), so a partly loaded memory holds no random instructions.
module main_memory
  import pp_pkg::*;
#(
  parameter int unsigned DEPTH = MEM_BYTES
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  we,
  input  addr_t waddr,
  input  byte_t wdata,
  input  addr_t raddr,
  output byte_t rdata
);

  byte_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < int'(DEPTH); i++) mem[i] <= '0;
      rdata <= '0;
    end else begin
      if (we && int'(waddr) < int'(DEPTH)) mem[waddr] <= wdata;
      rdata <= (int'(raddr) < int'(DEPTH)) ? mem[raddr] : '0;
    end
  end

endmodule
