// booth_mult_top: the radix-8 and the radix-16 N x N Booth multipliers side
// by side, each with its own operands and results.
//
// The two are alternative implementations of the same 16 x 16 signed
// multiplication, built to be compared: radix-8 recodes the multiplier into
// 6 digits in -4..+4 and needs one hard multiple (3M); radix-16 recodes it
// into 4 digits in -8..+8 and needs three (3M, 5M, 7M), trading adders in
// the multiple generator against fewer partial products. Keeping separate
// ports lets both be exercised, timed or synthesised independently.
//
// Purely combinational, no clock and no reset.
module booth_mult_top #(
  parameter int N = 16                  // operand width of both multipliers
) (
  input  logic [N-1:0]   r8_a,          // radix-8: multiplicand
  input  logic [N-1:0]   r8_b,          // radix-8: multiplier
  output logic [2*N-1:0] r8_product,    // radix-8: r8_a * r8_b
  output logic           r8_ovf,        // radix-8: product exceeds N bits signed
  input  logic [N-1:0]   r16_a,         // radix-16: multiplicand
  input  logic [N-1:0]   r16_b,         // radix-16: multiplier
  output logic [2*N-1:0] r16_product,   // radix-16: r16_a * r16_b
  output logic           r16_ovf        // radix-16: product exceeds N bits signed
);

  booth_r8_mult #(.N(N)) u_r8 (
    .a       (r8_a),
    .b       (r8_b),
    .product (r8_product),
    .ovf     (r8_ovf)
  );

  booth_r16_mult #(.N(N)) u_r16 (
    .a       (r16_a),
    .b       (r16_b),
    .product (r16_product),
    .ovf     (r16_ovf)
  );

endmodule
