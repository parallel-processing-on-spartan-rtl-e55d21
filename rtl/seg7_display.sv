// seg7_display: four-digit multiplexed seven-segment display driver.
//
// Shows a 16-bit value as four hexadecimal digits on a common-anode display
// of the kind found on the prototyping board used for the calculator
// (4 digits, segments and digit enables active low). A free-running
// counter of REFRESH_BITS bits scans the digits: its two top bits pick the
// digit, so each digit is lit for 2^(REFRESH_BITS-2) cycles in turn
// (about 1.3 ms per digit at 50 MHz with the default of 18). Digit 3
// (an[3]) shows value[15:12], digit 0 shows value[3:0]. The decimal points
// stay off. The description says only that results are shown on the seven
// segment display; the scan rate, polarity and hex format are this
// design's choices.
module seg7_display #(
  parameter int unsigned REFRESH_BITS = 18
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] value,
  output logic [3:0]  an,    // digit enables, active low
  output logic [6:0]  seg,   // segments {g,f,e,d,c,b,a}, active low
  output logic        dp     // decimal point, active low (off)
);

  logic [REFRESH_BITS-1:0] scan;
  logic [1:0]              digit;
  logic [3:0]              nib;
  logic [6:0]              lit;   // active-high {g,f,e,d,c,b,a}

  always_ff @(posedge clk) begin
    if (rst) scan <= '0;
    else     scan <= scan + 1'b1;
  end

  assign digit = scan[REFRESH_BITS-1 -: 2];

  always_comb begin
    unique case (digit)
      2'd0: nib = value[3:0];
      2'd1: nib = value[7:4];
      2'd2: nib = value[11:8];
      2'd3: nib = value[15:12];
      default: nib = value[3:0];
    endcase
    unique case (nib)
      4'h0: lit = 7'b0111111;
      4'h1: lit = 7'b0000110;
      4'h2: lit = 7'b1011011;
      4'h3: lit = 7'b1001111;
      4'h4: lit = 7'b1100110;
      4'h5: lit = 7'b1101101;
      4'h6: lit = 7'b1111101;
      4'h7: lit = 7'b0000111;
      4'h8: lit = 7'b1111111;
      4'h9: lit = 7'b1101111;
      4'hA: lit = 7'b1110111;
      4'hB: lit = 7'b1111100;
      4'hC: lit = 7'b0111001;
      4'hD: lit = 7'b1011110;
      4'hE: lit = 7'b1111001;
      4'hF: lit = 7'b1110001;
      default: lit = 7'b0000000;
    endcase
  end

  assign seg = ~lit;
  assign an  = ~(4'b0001 << digit);
  assign dp  = 1'b1;

endmodule
