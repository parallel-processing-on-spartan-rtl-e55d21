// tb_thread_core: runs random instruction sequences through one thread and
// compares the accumulator and flag with an integer model. It also checks
// the timing: 'busy' stays high for exactly three cycles after the start,
// 'done' pulses once in the last of them, and the accumulator changes only
// at the end.
module tb_thread_core;
  import pp_pkg::*;

  logic     clk = 0, rst = 1, start = 0, clear = 0;
  decoded_t dec = '0;
  byte_t    imm = '0, acc;
  logic     busy, done, flag;
  int       checks = 0, failures = 0;

  thread_core dut (.clk, .rst, .clear, .start, .dec, .imm, .busy, .done, .acc, .flag);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (acc=%0d flag=%0d)", what, acc, flag);
    end
  endtask

  initial begin
    int m_acc = 0, m_flag = 0, r, busy_cycles, done_cycles;
    byte_t acc_before;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(acc == 0 && !busy, "reset state");
    for (int n = 0; n < 1000; n++) begin
      int kind, v;
      kind = (n == 0) ? 0 : $urandom_range(4);   // 0 MVI 1 INC 2 ADI 3 SUI 4 MULI
      v    = $urandom_range(255);
      dec = '0; dec.valid = 1;
      case (kind)
        0: begin dec.has_imm = 1; dec.alu_op = ALU_PASS; r = v; end
        1: begin dec.treg_one = 1; dec.alu_op = ALU_ADD; r = m_acc + 1; end
        2: begin dec.has_imm = 1; dec.alu_op = ALU_ADD; r = m_acc + v; end
        3: begin dec.has_imm = 1; dec.alu_op = ALU_SUB; r = m_acc - v; end
        default: begin dec.has_imm = 1; dec.alu_op = ALU_MUL; r = m_acc * v; end
      endcase
      m_flag = (r > 255 || r < 0);
      m_acc  = (r % 256 + 256) % 256;
      imm   = byte_t'(v);
      start = 1;
      acc_before = acc;
      @(posedge clk); #1;
      start = 0;
      busy_cycles = 0; done_cycles = 0;
      while (busy) begin
        if (done) done_cycles++;
        if (busy_cycles < 2) chk(acc == acc_before, "acc unchanged during execution");
        busy_cycles++;
        @(posedge clk); #1;
      end
      chk(busy_cycles == 3, $sformatf("busy for 3 cycles (got %0d)", busy_cycles));
      chk(done_cycles == 1, "one done pulse");
      chk(int'(acc) == m_acc, $sformatf("acc after op %0d expected %0d", kind, m_acc));
      chk(int'(flag) == m_flag, $sformatf("flag after op %0d expected %0d", kind, m_flag));
      if ($urandom_range(3) == 0) repeat ($urandom_range(3)) @(posedge clk);
      if ($urandom_range(50) == 0) begin
        #1 clear = 1;
        @(posedge clk); #1;
        clear = 0;
        m_acc = 0; m_flag = 0;
        chk(acc == 0 && !flag, "clear zeroes accumulator and flag");
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
