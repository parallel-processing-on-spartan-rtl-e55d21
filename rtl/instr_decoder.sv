// instr_decoder: the instruction decoder fed by the instruction register.
//
// Combinational. It turns the first byte of an instruction into the control
// word used by the control unit and the threads: whether the instruction
// does work in a thread, which accumulator/thread it names, whether an
// immediate byte follows, whether TREG is loaded with 1 (INC), and the ALU
// operation. The instruction set is the described one; the encoding (see
// pp_pkg) is this design's own. Unused opcodes decode as NOP.
module instr_decoder
  import pp_pkg::*;
(
  input  byte_t    ir,
  output decoded_t dec
);

  opcode_e op;

  always_comb begin
    op           = opcode_e'(ir[7:5]);
    dec          = '0;
    dec.reg_sel  = ir[4];
    dec.alu_op   = ALU_PASS;
    unique case (op)
      OP_MVI:  begin dec.valid = 1'b1; dec.has_imm = 1'b1; dec.alu_op = ALU_PASS; end
      OP_INC:  begin dec.valid = 1'b1; dec.treg_one = 1'b1; dec.alu_op = ALU_ADD; end
      OP_ADI:  begin dec.valid = 1'b1; dec.has_imm = 1'b1; dec.alu_op = ALU_ADD;  end
      OP_SUI:  begin dec.valid = 1'b1; dec.has_imm = 1'b1; dec.alu_op = ALU_SUB;  end
      OP_MULI: begin dec.valid = 1'b1; dec.has_imm = 1'b1; dec.alu_op = ALU_MUL;  end
      default: ;  // NOP and unused opcodes: fetch and decode only
    endcase
  end

endmodule
