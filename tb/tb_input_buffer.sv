// tb_input_buffer: pushes random bytes, checks count, full and the sticky
// overflow, then transfers and checks that memory receives the bytes in
// entry order at addresses 0, 1, 2, ... one per cycle, that 'xfer_done'
// pulses once and that 'prog_len' is the number of bytes moved. Several
// rounds of different lengths exercise the pointer wrap-around.
module tb_input_buffer;
  import pp_pkg::*;
  localparam int D = MEM_BYTES;

  logic  clk = 0, rst = 1, push = 0, transfer = 0;
  byte_t din = '0, last_in, mem_wdata;
  logic  full, empty, overflow, busy, mem_we, xfer_done;
  logic [$clog2(D+1)-1:0] count;
  addr_t mem_addr, prog_len;
  byte_t mem [32];
  int    checks = 0, failures = 0, nwrites = 0;

  input_buffer dut (.clk, .rst, .push, .din, .transfer, .full, .empty,
    .count, .overflow, .last_in, .busy, .mem_we, .mem_addr, .mem_wdata,
    .xfer_done, .prog_len);

  always #5 clk = ~clk;

  always @(posedge clk) if (mem_we) begin
    mem[mem_addr] <= mem_wdata;
    nwrites++;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    byte_t exp [D];
    int n, cyc, dones;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    chk(empty && !full && count == 0 && !overflow, "reset state");
    for (int round = 0; round < 8; round++) begin
      n = (round == 0) ? D : (round == 1) ? 0 : $urandom_range(1, D);
      for (int i = 0; i < n; i++) begin
        exp[i] = byte_t'($urandom);
        push = 1; din = exp[i];
        @(posedge clk); #1;
        chk(int'(count) == i + 1, "count follows pushes");
        chk(last_in == exp[i], "last_in");
      end
      push = 0;
      chk(full == (n == D), "full flag");
      if (n == D) begin
        chk(!overflow, "no overflow before an extra push");
        push = 1; din = 8'hA5;
        @(posedge clk); #1;
        push = 0;
        chk(overflow && int'(count) == D, "push into full buffer sets overflow and is dropped");
      end
      for (int i = 0; i < 32; i++) mem[i] = 8'h00;
      nwrites = 0;
      transfer = 1;
      @(posedge clk); #1;
      transfer = 0;
      cyc = 0; dones = 0;
      while (busy && cyc < 100) begin
        push = 1; din = 8'h5A;         // ignored while moving
        @(posedge clk); #1;
        if (xfer_done) dones++;
        cyc++;
      end
      push = 0;
      chk(nwrites == n, $sformatf("writes %0d expected %0d", nwrites, n));
      chk(cyc == n + 1, $sformatf("transfer took %0d cycles, expected %0d", cyc, n + 1));
      chk(dones == 1, "one xfer_done pulse");
      chk(int'(prog_len) == n, "prog_len");
      chk(empty && count == 0, "empty after transfer");
      for (int i = 0; i < n; i++) chk(mem[i] == exp[i], $sformatf("memory byte %0d", i));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
