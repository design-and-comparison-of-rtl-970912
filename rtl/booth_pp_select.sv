// booth_pp_select: partial product generator for one Booth digit.
//
// Picks the multiple of the multiplicand named by the digit's magnitude and,
// for a negative digit, inverts it bit by bit. The +1 that completes the
// two's complement negation is not added here: it leaves as `neg` and is
// added in the column of the row's least significant bit by booth_pp_sum, so
// no carry-propagate adder sits in the partial product path. This split is a
// common Booth arrangement chosen by this design; the recoding tables only
// say that +k*M or -k*M is formed.
//
// Interface: mult[k] = k*M for k = 0..MAXMAG (from booth_multiples), a digit
// in; row (W bits) and neg out, with row + neg = digit * M (mod 2^W).
// Purely combinational, no clock.
module booth_pp_select
  import booth_pkg::*;
#(
  parameter  int N      = 16,
  parameter  int MAXMAG = 8,
  localparam int W      = N + $clog2(MAXMAG)
) (
  input  logic [MAXMAG:0][W-1:0] mult,    // the multiples 0..MAXMAG times M
  input  booth_digit_t           digit,   // recoded Booth digit
  output logic [W-1:0]           row,     // selected multiple, inverted if negative
  output logic                   neg      // +1 to add at the row's LSB
);

  logic [W-1:0] sel;

  always_comb begin
    sel = '0;
    for (int k = 0; k <= MAXMAG; k++) begin
      if (int'(digit.mag) == k) sel = mult[k];
    end
  end

  assign row = digit.neg ? ~sel : sel;
  assign neg = digit.neg;

endmodule
