// tb_seg7_display: with a short scan counter, checks that each digit enable
// goes low in turn, only one at a time, for 2^(REFRESH_BITS-2) cycles, and
// that the segments show the right hexadecimal digit of the value.
module tb_seg7_display;
  localparam int RB = 6;

  logic        clk = 0, rst = 1;
  logic [15:0] value = '0;
  logic [3:0]  an;
  logic [6:0]  seg;
  logic        dp;
  int          checks = 0, failures = 0;

  // Reference font, active high {g,f,e,d,c,b,a}.
  localparam logic [6:0] FONT [16] = '{
    7'h3F, 7'h06, 7'h5B, 7'h4F, 7'h66, 7'h6D, 7'h7D, 7'h07,
    7'h7F, 7'h6F, 7'h77, 7'h7C, 7'h39, 7'h5E, 7'h79, 7'h71 };

  seg7_display #(.REFRESH_BITS(RB)) dut (.clk, .rst, .value, .an, .seg, .dp);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int d;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int v = 0; v < 40; v++) begin
      value = (v < 16) ? {4{4'(v)}} : 16'($urandom);
      #1;
      for (int c = 0; c < 2**RB; c++) begin
        d = c >> (RB - 2);
        checks++;
        if (an != ~(4'b1 << d) || seg != ~FONT[value[d*4 +: 4]] || dp != 1'b1) begin
          failures++;
          if (failures < 10)
            $display("FAIL value=%04h cycle=%0d an=%b seg=%b", value, c, an, seg);
        end
        @(posedge clk); #1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
