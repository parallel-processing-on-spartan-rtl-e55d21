// tb_control_unit: drives the control unit with a program in a model memory
// and two model threads (busy for three cycles after each start, like the
// real thread). It checks that the instructions are issued in program
// order, to the thread named by the register bit, with the right decoded
// word and immediate, that NOPs are not issued, that single mode never
// overlaps and dual mode does, that issue stalls while the target thread is
// busy, and the exact cycle counts of a fixed program in both modes.
module tb_control_unit;
  import pp_pkg::*;

  logic     clk = 0, rst = 1, run = 0, dual_mode = 0;
  addr_t    prog_len = '0, mem_raddr;
  byte_t    mem_rdata = '0, imm, ir;
  logic [1:0] start, busy;
  decoded_t dec;
  logic     running, done, clear;
  logic [15:0] run_cycles, stall_cycles;
  logic [7:0]  instr_count;
  byte_t    mem [32];
  int       bcnt [2];
  int       checks = 0, failures = 0;

  control_unit dut (.clk, .rst, .run, .dual_mode, .prog_len, .mem_raddr, .mem_rdata,
    .clear, .start, .dec, .imm, .busy, .running, .done, .ir, .run_cycles, .stall_cycles,
    .instr_count);

  always #5 clk = ~clk;

  // model memory: synchronous read
  always @(posedge clk) mem_rdata <= mem[mem_raddr];

  // model threads
  always @(posedge clk) begin
    for (int t = 0; t < 2; t++) begin
      if (rst) bcnt[t] <= 0;
      else if (start[t]) bcnt[t] <= 3;
      else if (bcnt[t] > 0) bcnt[t] <= bcnt[t] - 1;
    end
  end
  assign busy[0] = bcnt[0] > 0;
  assign busy[1] = bcnt[1] > 0;

  // expected issue list
  int    exp_n;
  int    exp_t [20];
  byte_t exp_ir [20];
  byte_t exp_imm [20];
  int    got_n, overlaps, stalls_seen;

  always @(posedge clk) if (!rst) begin
    if (busy == 2'b11 || (|(busy & (start >> 1 | start << 1)))) overlaps++;
    if (start != 0) begin
      int t;
      t = start[1] ? 1 : 0;
      checks++;
      if (got_n >= exp_n || t != exp_t[got_n] || ir != exp_ir[got_n] ||
          (dec.has_imm && imm != exp_imm[got_n]) || !dec.valid) begin
        failures++;
        $display("FAIL issue %0d: thread %0d ir %02h imm %02h", got_n, t, ir, imm);
      end
      got_n++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Load a program and its expected issue list.
  task automatic build_fixed();
    int a = 0;
    byte_t p [20] = '{
      encode(OP_MVI, 0), 8'd5,      // A1 = 5
      encode(OP_MVI, 1), 8'd7,      // A2 = 7
      encode(OP_INC, 0),            // A1 += 1
      encode(OP_INC, 0),            // A1 += 1  (stalls in dual mode)
      encode(OP_NOP, 0),
      encode(OP_ADI, 1), 8'd3,
      encode(OP_SUI, 0), 8'd2,
      encode(OP_MULI, 1), 8'd4,
      encode(OP_INC, 1),
      encode(OP_INC, 0),
      encode(OP_RSV7, 1),
      8'h00, 8'h00, 8'h00, 8'h00 };
    for (int i = 0; i < 32; i++) mem[i] = (i < 20) ? p[i] : 8'h00;
    prog_len = addr_t'(16);
    exp_n = 0;
    while (a < 16) begin
      logic [2:0] op = p[a][7:5];
      if (op >= 1 && op <= 5) begin
        exp_t[exp_n] = p[a][4]; exp_ir[exp_n] = p[a];
        exp_imm[exp_n] = (op == 2) ? 8'h00 : p[a+1];
        exp_n++;
        a += (op == 2) ? 1 : 2;
      end else a += 1;
    end
  endtask

  task automatic build_random();
    int a = 0;
    int len = $urandom_range(1, 20);
    exp_n = 0;
    for (int i = 0; i < 32; i++) mem[i] = 8'h00;
    while (a < len) begin
      logic [2:0] op = 3'($urandom_range(7));
      logic r = 1'($urandom);
      mem[a] = {op, r, 4'($urandom)};
      if (op >= 1 && op <= 5) begin
        exp_t[exp_n] = r; exp_ir[exp_n] = mem[a];
        if (op != 2) begin mem[a+1] = byte_t'($urandom); exp_imm[exp_n] = mem[a+1]; end
        exp_n++;
        a += (op == 2) ? 1 : 2;
      end else a += 1;
    end
    prog_len = addr_t'(a > 20 ? 20 : a);
    if (a > 20) begin            // immediate of the last instruction lies past the memory
      mem[20] = 8'h00;
      exp_imm[exp_n-1] = 8'h00;
    end
  endtask

  task automatic do_run(input bit dual, output int cycles);
    got_n = 0; overlaps = 0;
    dual_mode = dual;
    run = 1;
    #1;
    chk(clear, "clear pulses with an accepted run");
    @(posedge clk); #1;
    run = 0;
    chk(!clear, "clear lasts one cycle");
    cycles = 0;
    while (!done && cycles < 1000) begin @(posedge clk); #1; cycles++; end
    chk(done && !running, "run finishes");
    chk(got_n == exp_n, $sformatf("issued %0d of %0d", got_n, exp_n));
    chk(int'(run_cycles) == cycles, "run_cycles matches measured time");
    if (!dual) chk(overlaps == 0, "single mode never overlaps");
  endtask

  initial begin
    int c_single, c_dual;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(!running && !done, "idle after reset");

    build_fixed();
    do_run(0, c_single);
    chk(stall_cycles == 0, "no stalls in single mode");
    chk(instr_count == 11, $sformatf("11 instructions decoded (got %0d)", instr_count));
    do_run(1, c_dual);
    chk(overlaps > 0, "dual mode overlaps the threads");
    chk(stall_cycles > 0, "back-to-back INC on one thread stalls");
    stalls_seen = stall_cycles;
    $display("fixed program: single %0d cycles, dual %0d cycles, %0d stall cycles",
             c_single, c_dual, stalls_seen);
    chk(c_single == 72, $sformatf("single-mode time 72 cycles (got %0d)", c_single));
    chk(c_dual == 33, $sformatf("dual-mode time 33 cycles (got %0d)", c_dual));
    chk(stalls_seen == 4, $sformatf("4 stall cycles (got %0d)", stalls_seen));

    for (int k = 0; k < 200; k++) begin
      build_random();
      do_run(k % 2, c_dual);
      repeat ($urandom_range(2)) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
