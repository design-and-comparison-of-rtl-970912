// tb_booth_pp_sum: checks the partial product adder with the sign-extension
// trick, for radix-16 (K = 4, 4 rows of 19 bits) and radix-8 (K = 3, 6 rows
// of 18 bits), N = 16.
//
// For a random multiplicand M and random digits d_j (in -8..8 or -4..4,
// extremes included), the rows are formed as the selector forms them
// (|d_j|*M, inverted when d_j < 0, with neg_j = 1) and the product must equal
// sum_j d_j * M * 2^(K*j) modulo 2^32, computed with integer arithmetic.
// Combinational: checked 1 time unit after each input change.
module tb_booth_pp_sum;

  localparam int N = 16;

  logic [3:0][18:0] rows16;
  logic [3:0]       neg16;
  logic [31:0]      p16;
  logic [5:0][17:0] rows8;
  logic [5:0]       neg8;
  logic [31:0]      p8;
  int checks   = 0;
  int failures = 0;

  booth_pp_sum #(.N(N), .K(4)) dut16 (.rows(rows16), .neg(neg16), .product(p16));
  booth_pp_sum #(.N(N), .K(3)) dut8  (.rows(rows8),  .neg(neg8),  .product(p8));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint m, d, v, e16, e8;
      m = longint'($signed(16'($urandom)));
      if (n % 4 == 0) m = (n % 8 == 0) ? -32768 : 32767;
      e16 = 0;
      for (int j = 0; j < 4; j++) begin
        d = longint'($urandom_range(16, 0)) - 8;
        v = (d < 0 ? -d : d) * m;
        rows16[j] = (d < 0) ? ~19'(v) : 19'(v);
        neg16[j]  = (d < 0);
        e16 += d * m * (longint'(1) << (4 * j));
      end
      e8 = 0;
      for (int j = 0; j < 6; j++) begin
        d = longint'($urandom_range(8, 0)) - 4;
        v = (d < 0 ? -d : d) * m;
        rows8[j] = (d < 0) ? ~18'(v) : 18'(v);
        neg8[j]  = (d < 0);
        e8 += d * m * (longint'(1) << (3 * j));
      end
      #1;
      checks += 2;
      if (p16 !== 32'(e16)) begin
        failures++;
        if (failures < 10) $display("K=4: product %h, expected %h", p16, 32'(e16));
      end
      if (p8 !== 32'(e8)) begin
        failures++;
        if (failures < 10) $display("K=3: product %h, expected %h", p8, 32'(e8));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
