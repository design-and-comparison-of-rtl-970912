// tb_booth_r16_mult: checks the radix-16 Booth multiplier.
//
// The 16 x 16 default instance gets corner pairs (0, +-1, the extremes,
// alternating patterns) and random pairs; an 8 x 8 instance of the same
// module is tested exhaustively over all 65536 pairs. Each product is
// compared with the simulator's signed multiplication and each ovf with a
// check that the product fits in N bits signed. Combinational: checked
// 1 time unit after each input change.
module tb_booth_r16_mult;

  logic [15:0] a, b;
  logic [31:0] p;
  logic        ovf;
  logic [7:0]  a_s, b_s;
  logic [15:0] p_s;
  logic        ovf_s;
  int checks   = 0;
  int failures = 0;

  booth_r16_mult           dut   (.a, .b, .product(p), .ovf);
  booth_r16_mult #(.N(8))  dut_s (.a(a_s), .b(b_s), .product(p_s), .ovf(ovf_s));

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    longint e;
    a = x; b = y;
    #1;
    e = longint'($signed(x)) * longint'($signed(y));
    checks += 2;
    if (p !== 32'(e)) begin
      failures++;
      if (failures < 10) $display("%0d * %0d = %0d, expected %0d", $signed(x), $signed(y), $signed(p), e);
    end
    if (ovf !== (e > 32767 || e < -32768)) failures++;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [15:0] corner [8] = '{16'h0000, 16'h0001, 16'hFFFF, 16'h7FFF,
                              16'h8000, 16'h5555, 16'hAAAA, 16'h0100};

  initial begin
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++) check16(corner[i], corner[j]);
    for (int n = 0; n < 20000; n++) check16(16'($urandom), 16'($urandom));
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++) begin
        int e;
        a_s = 8'(x); b_s = 8'(y);
        #1;
        e = int'($signed(a_s)) * int'($signed(b_s));
        checks += 2;
        if (p_s !== 16'(e)) failures++;
        if (ovf_s !== (e > 127 || e < -128)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
