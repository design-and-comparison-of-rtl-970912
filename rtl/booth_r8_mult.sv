// booth_r8_mult: N x N signed radix-8 Booth multiplier (N = 16 by default).
//
// The multiplier b is scanned 3 bits at a time with one bit of overlap:
// a 0 is appended below its LSB (y[-1]) and it is sign-extended at the top,
// giving NPP = ceil(N/3) groups of 3+1 bits (6 for N = 16).
// Each group is recoded by booth_r8_encoder into a digit in -4..+4. The
// multiples of the multiplicand a that the digits can name are formed once
// (booth_multiples; the odd ones, 3M, by adders), each digit selects and
// if needed complements one of them (booth_pp_select), and booth_pp_sum adds
// the rows, row j shifted by 3*j bits, using the sign-extension trick.
//
// Both operands and the 2N-bit product are two's complement. ovf is raised
// when the product does not fit in N bits signed, i.e. when truncating it to
// the operand width would lose information.
//
// The recoding follows the design's radix-8 table; the partial product
// count follows from scanning all N multiplier bits. How the multiples are
// built, the adder, and the meaning of ovf are this design's own choices.
//
// Purely combinational: no clock and no reset; product and ovf settle one
// combinational delay after a or b change.
module booth_r8_mult
  import booth_pkg::*;
#(
  parameter int N = 16                          // operand width
) (
  input  logic [N-1:0]   a,        // multiplicand M, two's complement
  input  logic [N-1:0]   b,        // multiplier Y (recoded), two's complement
  output logic [2*N-1:0] product,  // a * b, two's complement
  output logic           ovf       // product does not fit in N bits signed
);

  localparam int K      = 3;                       // bits per digit
  localparam int MAXMAG = 4;                      // largest |digit|
  localparam int NPP    = num_pp(N, K);           // partial products
  localparam int W      = N + K - 1;              // partial product width
  localparam int YW     = K * NPP + 1;            // extended multiplier width

  // Multiplier with y[-1] = 0 appended and sign-extended to NPP groups.
  logic signed [N:0]  y_app;
  logic [YW-1:0]      y_ext;
  assign y_app = {b, 1'b0};
  assign y_ext = YW'(y_app);

  logic [MAXMAG:0][W-1:0] mult;
  booth_digit_t [NPP-1:0] digit;
  logic [NPP-1:0][W-1:0]  rows;
  logic [NPP-1:0]         neg;

  booth_multiples #(.N(N), .MAXMAG(MAXMAG)) u_multiples (
    .m    (a),
    .mult (mult)
  );

  for (genvar j = 0; j < NPP; j++) begin : g_pp
    booth_r8_encoder u_enc (
      .grp   (y_ext[K*j +: K+1]),
      .digit (digit[j])
    );
    booth_pp_select #(.N(N), .MAXMAG(MAXMAG)) u_sel (
      .mult  (mult),
      .digit (digit[j]),
      .row   (rows[j]),
      .neg   (neg[j])
    );
  end

  booth_pp_sum #(.N(N), .K(K)) u_sum (
    .rows    (rows),
    .neg     (neg),
    .product (product)
  );

  // Overflow of an N-bit result: the upper N+1 bits are not all copies of
  // the sign.
  assign ovf = !((&product[2*N-1:N-1]) || !(|product[2*N-1:N-1]));

endmodule
