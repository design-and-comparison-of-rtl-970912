// booth_pp_sum: adds the Booth partial products into the 2N-bit product.
//
// Row j (W bits, two's complement) has weight 2^(K*j): it is shifted left
// by K*j bits, the zeros padding it on the right as in the partial product
// diagrams of the design. Instead of sign-extending every row to the product
// width, the sign-extension trick is used: each row's sign bit is inverted
// and a single constant is added,
//   sext(row) = (row XOR 2^(W-1)) - 2^(W-1),
//   CORR      = -sum_j 2^(W-1+K*j)  (mod 2^(2N)),
// so the rows only occupy their own W columns plus the constant's ones.
// The negation bit neg[j] of each row is added in column K*j. Bits above
// 2N-1 are dropped, which is exact for the modular sum.
//
// The final addition is written as one multi-operand sum and left to
// synthesis; the adder structure is this design's choice, as the design
// fixes only that the partial products are added.
//
// Interface: NPP rows and their neg bits in, product out.
// Purely combinational, no clock.
module booth_pp_sum #(
  parameter  int N   = 16,                   // operand width
  parameter  int K   = 4,                    // multiplier bits per digit (3: radix-8, 4: radix-16)
  localparam int NPP = (N + K - 1) / K,      // number of partial products
  localparam int W   = N + K - 1,            // partial product row width
  localparam int PW  = 2 * N                 // product width
) (
  input  logic [NPP-1:0][W-1:0] rows,
  input  logic [NPP-1:0]        neg,
  output logic [PW-1:0]         product
);

  // Constant of the sign-extension trick: minus the weights of all inverted
  // sign bits, modulo 2^PW.
  function automatic logic [PW-1:0] sign_corr();
    logic [PW-1:0] c;
    c = '0;
    for (int j = 0; j < NPP; j++) begin
      if (W - 1 + K * j < PW) c = c - (PW'(1) << (W - 1 + K * j));
    end
    return c;
  endfunction

  localparam logic [PW-1:0] CORR = sign_corr();

  logic [PW-1:0] acc;

  always_comb begin
    acc = CORR;
    for (int j = 0; j < NPP; j++) begin
      acc = acc + (PW'({~rows[j][W-1], rows[j][W-2:0]}) << (K * j))
                + (PW'(neg[j]) << (K * j));
    end
  end

  assign product = acc;

endmodule
