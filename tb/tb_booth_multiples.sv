// tb_booth_multiples: checks the multiple generator for both digit sets.
//
// A radix-16 instance (MAXMAG = 8, W = 19) and a radix-8 instance
// (MAXMAG = 4, W = 18), both N = 16, get the same multiplicand: corner
// values, then random ones. Every output mult[k] must equal k * M as a
// W-bit two's complement number, computed here with integer arithmetic.
// Combinational: checked 1 time unit after each input change.
module tb_booth_multiples;

  localparam int N = 16;

  logic [N-1:0]      m;
  logic [8:0][18:0]  mult16;
  logic [4:0][17:0]  mult8;
  int checks   = 0;
  int failures = 0;

  booth_multiples #(.N(N), .MAXMAG(8)) dut16 (.m, .mult(mult16));
  booth_multiples #(.N(N), .MAXMAG(4)) dut8  (.m, .mult(mult8));

  task automatic check(input logic [N-1:0] val);
    longint e;
    m = val;
    #1;
    for (int k = 0; k <= 8; k++) begin
      e = longint'(k) * longint'($signed(val));
      checks++;
      if (mult16[k] !== 19'(e)) begin
        failures++;
        if (failures < 10) $display("MAXMAG=8: %0d * %0d = %0d", k, $signed(val), $signed(mult16[k]));
      end
      if (k <= 4) begin
        checks++;
        if (mult8[k] !== 18'(e)) begin
          failures++;
          if (failures < 10) $display("MAXMAG=4: %0d * %0d = %0d", k, $signed(val), $signed(mult8[k]));
        end
      end
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(16'h0000); check(16'h0001); check(16'hFFFF);
    check(16'h7FFF); check(16'h8000); check(16'h5555); check(16'hAAAA);
    for (int n = 0; n < 2000; n++) check(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
