// tb_alu: checks the thread ALU against integer arithmetic.
// Every operation is tried on all 65,536 operand pairs; result and flag
// are compared with values computed from plain integers.
module tb_alu;
  import pp_pkg::*;

  alu_op_e op;
  byte_t   a, b, y;
  logic    flag;
  int      checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y, .flag);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ey, ef, r;
    for (int o = 0; o < 4; o++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          op = alu_op_e'(o); a = byte_t'(i); b = byte_t'(j);
          #1;
          case (o)
            0: begin r = j;     ey = r;        ef = 0;                end
            1: begin r = i + j; ey = r % 256;  ef = (r > 255);        end
            2: begin r = i - j; ey = (r + 256) % 256; ef = (r < 0);   end
            default: begin r = i * j; ey = r % 256; ef = (r > 255);   end
          endcase
          checks++;
          if (int'(y) != ey || int'(flag) != ef) begin
            failures++;
            if (failures < 10)
              $display("FAIL op=%0d a=%0d b=%0d y=%0d flag=%0d exp %0d/%0d", o, i, j, y, flag, ey, ef);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
