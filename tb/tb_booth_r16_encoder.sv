// tb_booth_r16_encoder: exhaustive test of the radix-16 Booth recoder.
//
// Applies all 32 group codes {y[i+3] .. y[i-1]} and compares the
// signed digit (neg ? -mag : mag) with
// -8*y[i+3] + 4*y[i+2] + 2*y[i+1] + y[i] + y[i-1].
// A zero digit must come out as +0. Combinational: checked 1 time unit after
// each input change.
module tb_booth_r16_encoder;
  import booth_pkg::*;

  logic [4:0]   grp;
  booth_digit_t digit;
  int checks   = 0;
  int failures = 0;

  booth_r16_encoder dut (.grp, .digit);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 32; c++) begin
      int expected, got;
      grp = 5'(c);
      #1;
      expected = -8 * int'(grp[4]) + 4 * int'(grp[3]) + 2 * int'(grp[2]) + int'(grp[1]) + int'(grp[0]);
      got      = digit.neg ? -int'(digit.mag) : int'(digit.mag);
      checks++;
      if (got != expected) begin
        failures++;
        $display("code %b: digit %0d, expected %0d", grp, got, expected);
      end
      checks++;
      if (expected == 0 && digit.neg) begin
        failures++;
        $display("code %b: zero digit with neg set", grp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
