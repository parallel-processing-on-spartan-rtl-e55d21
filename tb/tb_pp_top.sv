// tb_pp_top: end-to-end test of the dual-thread calculator at its default
// parameters.
//
// Each program is entered byte by byte through the input buffer, moved to
// memory, and run once in single mode and once in dual mode. After each run
// the two accumulators and flags are compared with an instruction-level
// model written in this testbench, and the seven-segment outputs are decoded
// and compared with the accumulators. The programs are a fixed one that
// uses every instruction and random ones. The test counts how often each
// mechanism of the design happened and fails if one never did: every
// opcode, each ALU flag (carry, borrow, product overflow), issue stalls,
// both threads working in the same cycle, dual mode beating single mode,
// an input-buffer overflow, and the display switching between the entry
// view and the result view.
module tb_pp_top;
  import pp_pkg::*;

  logic        clk = 0, rst = 1;
  byte_t       in_data = '0;
  logic        in_push = 0, in_load = 0, run = 0, dual_mode = 0;
  logic [3:0]  an;
  logic [6:0]  seg;
  logic        dp;
  byte_t       acc1, acc2, ir;
  logic        flag1, flag2, running, done, loading, load_done;
  logic        buf_overflow, buf_full, buf_empty;
  addr_t       prog_len;
  logic [15:0] run_cycles, stall_cycles;
  logic [7:0]  instr_count;
  logic [1:0]  thread_busy, thread_done;

  pp_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_op [8];
  int n_carry = 0, n_borrow = 0, n_movf = 0, n_stall = 0, n_overlap = 0;
  int n_faster = 0, n_bufovf = 0, n_entry_view = 0, n_result_view = 0;

  localparam logic [6:0] FONT [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71 };

  always @(posedge clk) if (!rst && thread_busy == 2'b11) n_overlap++;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Digit currently shown, decoded from the segment outputs.
  function automatic int shown_digit(output int pos);
    pos = -1;
    for (int d = 0; d < 4; d++) if (an == ~(4'b1 << d)) pos = d;
    for (int v = 0; v < 16; v++) if (seg == ~FONT[v]) return v;
    return -1;
  endfunction

  // Watch the display for 'cycles' cycles; every lit digit must match.
  task automatic check_display(input logic [15:0] exp, input int cycles, input string what);
    int pos, v, bad = 0, seen = 0;
    for (int c = 0; c < cycles; c++) begin
      v = shown_digit(pos);
      if (pos < 0 || v != int'(exp[pos*4 +: 4])) bad++;
      else seen |= (1 << pos);
      @(posedge clk); #1;
    end
    chk(bad == 0, $sformatf("display shows %04h (%s)", exp, what));
    if (cycles >= (1 << 18)) chk(seen == 15, "all four digits scanned");
  endtask

  // Instruction-level model of a whole program.
  task automatic model_run(input byte_t p [MEM_BYTES], input int len,
                           output int a [2], output int f [2]);
    int pc = 0, r, v, op, t;
    a = '{0, 0}; f = '{0, 0};
    while (pc < len) begin
      op = p[pc][7:5]; t = p[pc][4];
      v  = (pc + 1 < MEM_BYTES) ? int'(p[pc+1]) : 0;
      case (op)
        1: begin r = v;        pc += 2; end
        2: begin r = a[t] + 1; pc += 1; end
        3: begin r = a[t] + v; pc += 2; end
        4: begin r = a[t] - v; pc += 2; end
        5: begin r = a[t] * v; pc += 2; end
        default: begin pc += 1; n_op[op]++; continue; end
      endcase
      n_op[op]++;
      f[t] = (r < 0 || r > 255);
      if (f[t]) begin
        if (op == 2 || op == 3) n_carry++;
        if (op == 4) n_borrow++;
        if (op == 5) n_movf++;
      end
      a[t] = (r % 256 + 256) % 256;
    end
  endtask

  task automatic enter_program(input byte_t p [MEM_BYTES], input int len);
    for (int i = 0; i < len; i++) begin
      in_data = p[i]; in_push = 1;
      @(posedge clk); #1;
    end
    in_push = 0;
    #1;
    if (len > 0) begin
      check_display({8'(len), p[len-1]}, 64, "entry view: count and last byte");
      n_entry_view++;
    end
    in_load = 1;
    @(posedge clk); #1;
    in_load = 0;
    while (!load_done) begin @(posedge clk); #1; end
    chk(int'(prog_len) == len, "program length after transfer");
  endtask

  task automatic run_once(input bit dual, input int ea [2], input int ef [2],
                          output int cycles);
    int n = 0;
    dual_mode = dual; run = 1;
    @(posedge clk); #1;
    run = 0;
    while (!done && n < 2000) begin @(posedge clk); #1; n++; end
    cycles = int'(run_cycles);
    chk(done, "run completes");
    chk(int'(acc1) == ea[0] && int'(acc2) == ea[1],
        $sformatf("%s: A1=%02h A2=%02h expected %02h %02h", dual ? "dual" : "single",
                  acc1, acc2, ea[0], ea[1]));
    chk(int'(flag1) == ef[0] && int'(flag2) == ef[1], "flags");
    if (dual && stall_cycles > 0) n_stall++;
  endtask

  task automatic do_program(input byte_t p [MEM_BYTES], input int len, input int disp_cycles);
    int ea [2], ef [2], cs, cd;
    model_run(p, len, ea, ef);
    enter_program(p, len);
    run_once(0, ea, ef, cs);
    run_once(1, ea, ef, cd);
    check_display({acc1, acc2}, disp_cycles, "result view: A1 A2");
    n_result_view++;
    if (cd < cs) n_faster++;
    chk(cd <= cs, $sformatf("dual (%0d cycles) not slower than single (%0d)", cd, cs));
  endtask

  initial begin
    byte_t p [MEM_BYTES];
    int    len, a;
    repeat (3) @(posedge clk);
    #1 rst = 0;

    // Fixed program using every instruction on both threads (20 bytes).
    p = '{
      encode(OP_MVI, 0), 8'd200,   // A1 = 200
      encode(OP_MVI, 1), 8'd3,     // A2 = 3
      encode(OP_ADI, 0), 8'd100,   // A1 = 44, carry
      encode(OP_MULI, 1), 8'd100,  // A2 = 44, overflow (300)
      encode(OP_INC, 0),           // A1 = 45
      encode(OP_INC, 0),           // A1 = 46 (stall)
      encode(OP_NOP, 0),
      encode(OP_SUI, 1), 8'd50,    // A2 = 250, borrow
      encode(OP_INC, 1),           // A2 = 251
      encode(OP_RSV6, 0),
      encode(OP_SUI, 0), 8'd6,     // A1 = 40
      encode(OP_RSV7, 1),
      encode(OP_INC, 1),           // A2 = 252
      encode(OP_INC, 1) };         // A2 = 253
    do_program(p, 20, 1 << 18);
    chk(acc1 == 8'd40 && acc2 == 8'd253, "fixed program end values");

    // Input-buffer overflow: a 21st byte is dropped.
    for (int i = 0; i < MEM_BYTES + 1; i++) begin
      in_data = encode(OP_INC, 1'(i)); in_push = 1;
      @(posedge clk); #1;
    end
    in_push = 0;
    chk(buf_full && buf_overflow, "input buffer full and overflow flagged");
    if (buf_overflow) n_bufovf++;
    in_load = 1; @(posedge clk); #1; in_load = 0;
    while (!load_done) begin @(posedge clk); #1; end
    chk(int'(prog_len) == MEM_BYTES, "overflowed buffer still loads 20 bytes");

    // Random programs.
    for (int k = 0; k < 60; k++) begin
      len = $urandom_range(1, MEM_BYTES);
      a = 0;
      for (int i = 0; i < MEM_BYTES; i++) p[i] = 8'h00;
      while (a < len) begin
        logic [2:0] op;
        op = 3'($urandom_range(7));
        if ($urandom_range(3) == 0) op = OP_INC;
        p[a] = encode(opcode_e'(op), 1'($urandom));
        if (op != OP_INC && op >= OP_MVI && op <= OP_MULI && a + 1 < MEM_BYTES)
          p[a+1] = byte_t'($urandom);
        a += (op != OP_INC && op >= OP_MVI && op <= OP_MULI) ? 2 : 1;
      end
      len = (a > MEM_BYTES) ? MEM_BYTES : a;   // include a trailing immediate
      do_program(p, len, 64);
    end

    $display("opcodes NOP=%0d MVI=%0d INC=%0d ADI=%0d SUI=%0d MULI=%0d unused=%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_op[4], n_op[5], n_op[6] + n_op[7]);
    $display("carry=%0d borrow=%0d mul_overflow=%0d stalls=%0d overlap_cycles=%0d dual_faster=%0d",
             n_carry, n_borrow, n_movf, n_stall, n_overlap, n_faster);
    $display("buffer_overflow=%0d entry_view=%0d result_view=%0d", n_bufovf, n_entry_view, n_result_view);
    for (int o = 0; o < 6; o++) chk(n_op[o] > 0, $sformatf("opcode %0d exercised", o));
    chk(n_op[6] + n_op[7] > 0, "unused opcode exercised");
    chk(n_carry > 0, "carry happened");
    chk(n_borrow > 0, "borrow happened");
    chk(n_movf > 0, "product overflow happened");
    chk(n_stall > 0, "issue stall happened");
    chk(n_overlap > 0, "both threads busy in one cycle");
    chk(n_faster > 0, "dual mode faster than single mode");
    chk(n_bufovf > 0, "input buffer overflow happened");
    chk(n_entry_view > 0 && n_result_view > 0, "display showed both views");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
