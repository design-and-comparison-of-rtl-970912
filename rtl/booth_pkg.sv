// booth_pkg: types and helper functions shared by the Booth multipliers.
//
// A recoded Booth digit is carried in sign/magnitude form: `neg` says the
// partial product is to be subtracted, `mag` is the multiple of the
// multiplicand (0..8) that is selected. Four magnitude bits cover both the
// radix-8 digit set {-4..+4} and the radix-16 digit set {-8..+8}.
// num_pp() gives the number of partial products for an N-bit two's
// complement multiplier scanned K bits at a time: ceil(N/K).
package booth_pkg;

  typedef struct packed {
    logic       neg;   // 1: digit is negative (subtract the multiple)
    logic [3:0] mag;   // |digit|, 0..8
  } booth_digit_t;

  // Number of Booth groups (partial products) for an n-bit signed multiplier
  // recoded k bits per digit.
  function automatic int num_pp(input int n, input int k);
    return (n + k - 1) / k;
  endfunction

endpackage
