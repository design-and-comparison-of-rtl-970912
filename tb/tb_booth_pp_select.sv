// tb_booth_pp_select: checks the partial product selector.
//
// The multiples input is filled with independent random words, so that a
// wrong selection cannot match by accident, and random digits (magnitude
// 0..8, either sign) are applied. The row must be the selected word, bitwise
// inverted for a negative digit, and neg must equal the digit's sign.
// Combinational: checked 1 time unit after each input change.
module tb_booth_pp_select;
  import booth_pkg::*;

  localparam int N      = 16;
  localparam int MAXMAG = 8;
  localparam int W      = 19;

  logic [MAXMAG:0][W-1:0] mult;
  booth_digit_t           digit;
  logic [W-1:0]           row;
  logic                   neg;
  int checks   = 0;
  int failures = 0;

  booth_pp_select #(.N(N), .MAXMAG(MAXMAG)) dut (.mult, .digit, .row, .neg);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [W-1:0] e;
      for (int k = 0; k <= MAXMAG; k++) mult[k] = W'($urandom);
      digit.mag = 4'($urandom_range(MAXMAG, 0));
      digit.neg = 1'($urandom);
      #1;
      e = mult[digit.mag];
      if (digit.neg) e = ~e;
      checks += 2;
      if (row !== e) begin
        failures++;
        if (failures < 10) $display("digit %s%0d: row %h, expected %h", digit.neg ? "-" : "+",
                                    digit.mag, row, e);
      end
      if (neg !== digit.neg) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
