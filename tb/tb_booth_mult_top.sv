// tb_booth_mult_top: end-to-end test of both 16 x 16 Booth multipliers at
// their default size.
//
// Drives corner-value pairs (0, +-1, the extremes, alternating patterns)
// crossed with each other, then random pairs, into the radix-8 and the
// radix-16 multiplier, and compares every product with the simulator's own
// signed multiplication and every ovf with a range check of that product.
// It also counts, from the multiplier operand, how often each Booth group
// code occurred (16 codes for radix-8, 32 for radix-16: every digit, every
// hard multiple and every sign) and how often ovf was 0 and 1; a code or an
// ovf value never exercised counts as a failure.
//
// The multipliers are combinational: each check is made 1 time unit after
// the operands change, i.e. within the same cycle.
module tb_booth_mult_top;

  localparam int N      = 16;
  localparam int NRAND  = 40000;

  logic [N-1:0]   r8_a, r8_b, r16_a, r16_b;
  logic [2*N-1:0] r8_product, r16_product;
  logic           r8_ovf, r16_ovf;

  int checks   = 0;
  int failures = 0;

  int r8_code_seen  [16];
  int r16_code_seen [32];
  int ovf_seen      [2];

  booth_mult_top dut (
    .r8_a, .r8_b, .r8_product, .r8_ovf,
    .r16_a, .r16_b, .r16_product, .r16_ovf
  );

  function automatic logic [2*N-1:0] ref_mul(input logic [N-1:0] x, input logic [N-1:0] y);
    longint p;
    p = longint'($signed(x)) * longint'($signed(y));
    return p[2*N-1:0];
  endfunction

  function automatic logic ref_ovf(input logic [N-1:0] x, input logic [N-1:0] y);
    longint p;
    p = longint'($signed(x)) * longint'($signed(y));
    return (p > longint'(2**(N-1) - 1)) || (p < -longint'(2**(N-1)));
  endfunction

  // Group codes seen by the recoders, derived from the operand alone.
  task automatic count_codes(input logic [N-1:0] y8, input logic [N-1:0] y16);
    logic [19:0] e;
    e = {{3{y8[N-1]}}, y8, 1'b0};                 // 6 groups of 3, plus y[-1]
    for (int j = 0; j < 6; j++) r8_code_seen[4'(e >> (3 * j))]++;
    e = {{3{y16[N-1]}}, y16, 1'b0};               // 4 groups of 4, plus y[-1]
    for (int j = 0; j < 4; j++) r16_code_seen[5'(e >> (4 * j))]++;
  endtask

  task automatic apply(input logic [N-1:0] a8, input logic [N-1:0] b8,
                       input logic [N-1:0] a16, input logic [N-1:0] b16);
    r8_a = a8; r8_b = b8; r16_a = a16; r16_b = b16;
    #1;
    count_codes(b8, b16);
    checks += 4;
    if (r8_product !== ref_mul(a8, b8)) begin
      failures++;
      if (failures < 10) $display("r8: %0d * %0d = %0d, expected %0d", $signed(a8), $signed(b8),
                                  $signed(r8_product), $signed(ref_mul(a8, b8)));
    end
    if (r8_ovf !== ref_ovf(a8, b8)) failures++;
    if (r16_product !== ref_mul(a16, b16)) begin
      failures++;
      if (failures < 10) $display("r16: %0d * %0d = %0d, expected %0d", $signed(a16), $signed(b16),
                                  $signed(r16_product), $signed(ref_mul(a16, b16)));
    end
    if (r16_ovf !== ref_ovf(a16, b16)) failures++;
    ovf_seen[r8_ovf]++;
    ovf_seen[r16_ovf]++;
  endtask

  // Watchdog.
  initial begin
    #(10 * NRAND + 100000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [N-1:0] corner [12] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF, 16'h8000, 16'h8001,
                                16'h5555, 16'hAAAA, 16'h00FF, 16'hFF00, 16'h0007, 16'h1234};

  initial begin
    for (int i = 0; i < 12; i++)
      for (int j = 0; j < 12; j++)
        apply(corner[i], corner[j], corner[j], corner[i]);
    for (int n = 0; n < NRAND; n++)
      apply(N'($urandom), N'($urandom), N'($urandom), N'($urandom));
    // Same operands into both: the two implementations must agree.
    for (int n = 0; n < 1000; n++) begin
      logic [N-1:0] x, y;
      x = N'($urandom); y = N'($urandom);
      apply(x, y, x, y);
      checks++;
      if (r8_product !== r16_product) failures++;
    end

    for (int c = 0; c < 16; c++) begin
      checks++;
      if (r8_code_seen[c] == 0) begin failures++; $display("radix-8 code %b never seen", 4'(c)); end
    end
    for (int c = 0; c < 32; c++) begin
      checks++;
      if (r16_code_seen[c] == 0) begin failures++; $display("radix-16 code %b never seen", 5'(c)); end
    end
    for (int v = 0; v < 2; v++) begin
      checks++;
      if (ovf_seen[v] == 0) begin failures++; $display("ovf=%0d never seen", v); end
    end
    $display("radix-8 group codes seen: min %0d per code; radix-16: min %0d per code; ovf 0/1: %0d/%0d",
             r8_code_seen.min()[0], r16_code_seen.min()[0], ovf_seen[0], ovf_seen[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
