// tb_instr_decoder: checks the decoded control word for all 256 first bytes
// against a table written from the instruction encoding.
module tb_instr_decoder;
  import pp_pkg::*;

  byte_t    ir;
  decoded_t dec;
  int       checks = 0, failures = 0;

  instr_decoder dut (.ir, .dec);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    decoded_t e;
    for (int i = 0; i < 256; i++) begin
      ir = byte_t'(i);
      #1;
      e = '0;
      e.reg_sel = ir[4];
      case (i >> 5)
        1: begin e.valid = 1; e.has_imm = 1; e.alu_op = ALU_PASS; end  // MVI
        2: begin e.valid = 1; e.treg_one = 1; e.alu_op = ALU_ADD; end  // INC
        3: begin e.valid = 1; e.has_imm = 1; e.alu_op = ALU_ADD;  end  // ADI
        4: begin e.valid = 1; e.has_imm = 1; e.alu_op = ALU_SUB;  end  // SUI
        5: begin e.valid = 1; e.has_imm = 1; e.alu_op = ALU_MUL;  end  // MULI
        default: ;
      endcase
      checks++;
      if (dec != e) begin
        failures++;
        $display("FAIL ir=%02h dec=%b exp=%b", ir, dec, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
