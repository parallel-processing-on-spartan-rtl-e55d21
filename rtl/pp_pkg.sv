// pp_pkg: types and constants shared by the dual-thread calculator processor.
//
// The processor works on unsigned 8-bit numbers over an 8-bit bus and keeps
// its program in a 20-byte shared memory; both numbers follow the design
// description. The six instructions (NOP, MVI, INC, ADI, SUI, MULI) are the
// described instruction set. Their binary encoding is this design's own
// choice:
//
//   byte 0 : [7:5] opcode  [4] register (0 = A1 / thread 0, 1 = A2 / thread 1)
//            [3:0] reserved, write 0
//   byte 1 : 8-bit immediate, present for MVI, ADI, SUI and MULI only
//
// Opcodes 6 and 7 are unused and execute as NOP. NOP is 8'h00, so a cleared
// memory reads as a run of NOPs. There is no halt instruction: a program ends
// when the program counter reaches the number of bytes that were loaded.
package pp_pkg;

  localparam int unsigned DATA_W    = 8;   // main bus and accumulator width
  localparam int unsigned MEM_BYTES = 20;  // shared main memory size
  localparam int unsigned ADDR_W    = $clog2(MEM_BYTES);
  localparam int unsigned NTHREADS  = 2;

  typedef logic [DATA_W-1:0] byte_t;
  typedef logic [ADDR_W-1:0] addr_t;

  typedef enum logic [2:0] {
    OP_NOP  = 3'd0,
    OP_MVI  = 3'd1,
    OP_INC  = 3'd2,
    OP_ADI  = 3'd3,
    OP_SUI  = 3'd4,
    OP_MULI = 3'd5,
    OP_RSV6 = 3'd6,
    OP_RSV7 = 3'd7
  } opcode_e;

  // Operation performed by a thread's ALU.
  typedef enum logic [1:0] {
    ALU_PASS = 2'd0,   // result = operand (MVI)
    ALU_ADD  = 2'd1,   // result = acc + operand (INC, ADI)
    ALU_SUB  = 2'd2,   // result = acc - operand (SUI)
    ALU_MUL  = 2'd3    // result = acc * operand, low 8 bits (MULI)
  } alu_op_e;

  // Decoded instruction handed from the control unit to a thread.
  typedef struct packed {
    logic    valid;     // instruction does work in a thread (not NOP)
    logic    reg_sel;   // 0 = A1 (thread 0), 1 = A2 (thread 1)
    logic    has_imm;   // a second byte (immediate) follows
    logic    treg_one;  // load TREG with 1 instead of the immediate (INC)
    alu_op_e alu_op;
  } decoded_t;

  // Build an instruction's first byte (used by testbenches and loaders).
  function automatic byte_t encode(opcode_e op, logic reg_sel);
    return {op, reg_sel, 4'b0000};
  endfunction

endpackage
