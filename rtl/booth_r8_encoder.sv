// booth_r8_encoder: radix-8 Booth recoding of one multiplier group.
//
// The group is four multiplier bits {y[i+2], y[i+1], y[i], y[i-1]}; the
// lowest bit overlaps the group below (y[-1] = 0 for the first group). The
// output digit is -4*y[i+2] + 2*y[i+1] + y[i] + y[i-1], one of -4..+4, given
// in sign/magnitude form. The mapping is the recoding table of the radix-8
// design, written out case by case. Codes 0000 and 1111 both give zero,
// encoded here with neg = 0 (a design choice; neg = 1 with mag = 0 would
// also sum to zero downstream).
//
// The shared digit type has a 4-bit magnitude for the radix-16 set; here
// mag[3] is always 0.
//
// Purely combinational, no clock.
module booth_r8_encoder
  import booth_pkg::*;
(
  input  logic [3:0]   grp,    // {y[i+2], y[i+1], y[i], y[i-1]}
  output booth_digit_t digit   // signed digit, sign/magnitude
);

  always_comb begin
    unique case (grp)
      4'b0000: digit = '{neg: 1'b0, mag: 4'd0};
      4'b0001: digit = '{neg: 1'b0, mag: 4'd1};
      4'b0010: digit = '{neg: 1'b0, mag: 4'd1};
      4'b0011: digit = '{neg: 1'b0, mag: 4'd2};
      4'b0100: digit = '{neg: 1'b0, mag: 4'd2};
      4'b0101: digit = '{neg: 1'b0, mag: 4'd3};
      4'b0110: digit = '{neg: 1'b0, mag: 4'd3};
      4'b0111: digit = '{neg: 1'b0, mag: 4'd4};
      4'b1000: digit = '{neg: 1'b1, mag: 4'd4};
      4'b1001: digit = '{neg: 1'b1, mag: 4'd3};
      4'b1010: digit = '{neg: 1'b1, mag: 4'd3};
      4'b1011: digit = '{neg: 1'b1, mag: 4'd2};
      4'b1100: digit = '{neg: 1'b1, mag: 4'd2};
      4'b1101: digit = '{neg: 1'b1, mag: 4'd1};
      4'b1110: digit = '{neg: 1'b1, mag: 4'd1};
      4'b1111: digit = '{neg: 1'b0, mag: 4'd0};
    endcase
  end

endmodule
