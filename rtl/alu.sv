// alu: the arithmetic unit of one thread.
//
// Combinational. It combines the accumulator (a) with the temporary register
// (b) and reports a flag: the carry out of an addition, the borrow of a
// subtraction, or that a product did not fit in 8 bits. The operations are
// the ones the instruction set needs: add (INC, ADI), subtract (SUI) and
// multiply (MULI) on unsigned numbers, plus a pass of b used by MVI.
// Keeping the 8 low bits of a product and flagging the overflow is this
// design's choice; the description only says the processor multiplies
// positive binary numbers.
module alu
  import pp_pkg::*;
(
  input  alu_op_e op,
  input  byte_t   a,      // accumulator
  input  byte_t   b,      // temporary register (TREG)
  output byte_t   y,
  output logic    flag    // carry / borrow / product overflow
);

  logic [DATA_W:0]     sum;
  logic [DATA_W:0]     diff;
  logic [2*DATA_W-1:0] prod;

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
    prod = a * b;
    unique case (op)
      ALU_PASS: begin y = b;                 flag = 1'b0;                 end
      ALU_ADD:  begin y = sum[DATA_W-1:0];   flag = sum[DATA_W];          end
      ALU_SUB:  begin y = diff[DATA_W-1:0];  flag = diff[DATA_W];         end
      ALU_MUL:  begin y = prod[DATA_W-1:0];  flag = |prod[2*DATA_W-1:DATA_W]; end
      default:  begin y = b;                 flag = 1'b0;                 end
    endcase
  end

endmodule
