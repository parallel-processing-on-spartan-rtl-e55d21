// tb_main_memory: checks reset to zero, write then read of every byte,
// the one-cycle read latency, and that out-of-range addresses read 0 and
// do not alias onto stored bytes.
module tb_main_memory;
  import pp_pkg::*;

  logic  clk = 0, rst = 1, we = 0;
  addr_t waddr = '0, raddr = '0;
  byte_t wdata = '0, rdata;
  byte_t model [MEM_BYTES];
  int    checks = 0, failures = 0;

  main_memory dut (.clk, .rst, .we, .waddr, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input int a, input int exp);
    raddr = addr_t'(a);
    @(posedge clk); #1;
    checks++;
    if (int'(rdata) != exp) begin
      failures++;
      $display("FAIL read [%0d] = %02h, expected %02h", a, rdata, exp);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < MEM_BYTES; i++) check_read(i, 0);
    for (int i = 0; i < MEM_BYTES; i++) begin
      model[i] = byte_t'($urandom);
      we = 1; waddr = addr_t'(i); wdata = model[i];
      @(posedge clk); #1;
    end
    // writes beyond the memory are ignored
    for (int i = MEM_BYTES; i < 2**ADDR_W; i++) begin
      waddr = addr_t'(i); wdata = 8'hEE;
      @(posedge clk); #1;
    end
    we = 0;
    for (int k = 0; k < 100; k++) begin
      int a;
      a = $urandom_range(MEM_BYTES - 1);
      check_read(a, int'(model[a]));
    end
    for (int i = MEM_BYTES; i < 2**ADDR_W; i++) check_read(i, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
