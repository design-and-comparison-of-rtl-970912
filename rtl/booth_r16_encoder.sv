// booth_r16_encoder: radix-16 Booth recoding of one multiplier group.
//
// The group is five multiplier bits {y[i+3], y[i+2], y[i+1], y[i], y[i-1]};
// the lowest bit overlaps the group below (y[-1] = 0 for the first group).
// The output digit is -8*y[i+3] + 4*y[i+2] + 2*y[i+1] + y[i] + y[i-1], one
// of -8..+8, in sign/magnitude form. The mapping is the radix-16 recoding
// table of the design, written out case by case. Codes 00000 and 11111 both
// give zero, encoded with neg = 0 (a design choice).
//
// Purely combinational, no clock.
module booth_r16_encoder
  import booth_pkg::*;
(
  input  logic [4:0]   grp,    // {y[i+3], y[i+2], y[i+1], y[i], y[i-1]}
  output booth_digit_t digit   // signed digit, sign/magnitude
);

  always_comb begin
    unique case (grp)
      5'b00000: digit = '{neg: 1'b0, mag: 4'd0};
      5'b00001: digit = '{neg: 1'b0, mag: 4'd1};
      5'b00010: digit = '{neg: 1'b0, mag: 4'd1};
      5'b00011: digit = '{neg: 1'b0, mag: 4'd2};
      5'b00100: digit = '{neg: 1'b0, mag: 4'd2};
      5'b00101: digit = '{neg: 1'b0, mag: 4'd3};
      5'b00110: digit = '{neg: 1'b0, mag: 4'd3};
      5'b00111: digit = '{neg: 1'b0, mag: 4'd4};
      5'b01000: digit = '{neg: 1'b0, mag: 4'd4};
      5'b01001: digit = '{neg: 1'b0, mag: 4'd5};
      5'b01010: digit = '{neg: 1'b0, mag: 4'd5};
      5'b01011: digit = '{neg: 1'b0, mag: 4'd6};
      5'b01100: digit = '{neg: 1'b0, mag: 4'd6};
      5'b01101: digit = '{neg: 1'b0, mag: 4'd7};
      5'b01110: digit = '{neg: 1'b0, mag: 4'd7};
      5'b01111: digit = '{neg: 1'b0, mag: 4'd8};
      5'b10000: digit = '{neg: 1'b1, mag: 4'd8};
      5'b10001: digit = '{neg: 1'b1, mag: 4'd7};
      5'b10010: digit = '{neg: 1'b1, mag: 4'd7};
      5'b10011: digit = '{neg: 1'b1, mag: 4'd6};
      5'b10100: digit = '{neg: 1'b1, mag: 4'd6};
      5'b10101: digit = '{neg: 1'b1, mag: 4'd5};
      5'b10110: digit = '{neg: 1'b1, mag: 4'd5};
      5'b10111: digit = '{neg: 1'b1, mag: 4'd4};
      5'b11000: digit = '{neg: 1'b1, mag: 4'd4};
      5'b11001: digit = '{neg: 1'b1, mag: 4'd3};
      5'b11010: digit = '{neg: 1'b1, mag: 4'd3};
      5'b11011: digit = '{neg: 1'b1, mag: 4'd2};
      5'b11100: digit = '{neg: 1'b1, mag: 4'd2};
      5'b11101: digit = '{neg: 1'b1, mag: 4'd1};
      5'b11110: digit = '{neg: 1'b1, mag: 4'd1};
      5'b11111: digit = '{neg: 1'b0, mag: 4'd0};
    endcase
  end

endmodule
