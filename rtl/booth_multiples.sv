// booth_multiples: the multiples of the multiplicand that the Booth digits
// select, 0*M .. MAXMAG*M.
//
// Even multiples are wired shifts of a smaller multiple (2M = M<<1,
// 4M = 2M<<1, 6M = 3M<<1, 8M = 4M<<1). Odd multiples above 1M are the
// "hard" multiples and each costs one adder: k*M = (k-1)*M + M, so
// 3M = 2M + M, 5M = 4M + M, 7M = 6M + M. A radix-8 multiplier needs
// MAXMAG = 4 (one adder, for 3M); a radix-16 multiplier needs MAXMAG = 8
// (three adders). The recoding tables fix which multiples are needed; how
// they are formed is this design's own choice (the simplest adder per odd
// multiple).
//
// Every multiple is a two's complement value of W = N + log2(MAXMAG) bits,
// which holds MAXMAG*M for any N-bit signed M.
//
// mult[0] is constant zero and the even multiples are shifted copies of the
// input, so many output bits are plain wires or constants by construction.
//
// Interface: m (N-bit signed multiplicand) in, mult[k] = k*M out.
// Purely combinational, no clock.
module booth_multiples #(
  parameter  int N      = 16,              // multiplicand width
  parameter  int MAXMAG = 8,               // largest digit magnitude: 4 or 8
  localparam int W      = N + $clog2(MAXMAG)
) (
  input  logic [N-1:0]            m,       // multiplicand, two's complement
  output logic [MAXMAG:0][W-1:0]  mult     // mult[k] = k * m, two's complement
);

  logic signed [W-1:0] m_ext;
  assign m_ext = W'(signed'(m));

  assign mult[0] = '0;
  assign mult[1] = m_ext;

  for (genvar k = 2; k <= MAXMAG; k++) begin : g_mult
    if (k % 2 == 0) begin : g_even
      assign mult[k] = {mult[k/2][W-2:0], 1'b0};
    end else begin : g_odd
      assign mult[k] = mult[k-1] + mult[1];
    end
  end

endmodule
