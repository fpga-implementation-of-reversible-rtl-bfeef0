// tb_hng: exhaustive self-checking test of the HNG gate.
//
// All 16 input vectors are applied. W and X must copy A and B; Y and Z are
// compared with the arithmetic sum A + B + C (Y its low bit, Z its high bit
// XOR D), worked out with integer addition rather than the gate's logic
// equations. The 16 output vectors must all differ (the gate is
// reversible), and with D = 0 the gate must behave as a full adder.
module tb_hng;

  logic a, b, c, d;
  logic w, x, y, z;
  int   checks = 0;
  int   failures = 0;

  hng dut (.a(a), .b(b), .c(c), .d(d), .w(w), .x(x), .y(y), .z(z));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] seen;
    int          total;
    logic [3:0]  exp_out;
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {a, b, c, d} = 4'(v);
      #1;
      total   = int'(a) + int'(b) + int'(c);
      exp_out = {a, b, total[0], total[1] ^ d};
      checks++;
      if ({w, x, y, z} !== exp_out) begin
        failures++;
        $display("FAIL in=%04b out=%04b expected=%04b", 4'(v), {w, x, y, z}, exp_out);
      end
      seen[{w, x, y, z}] = 1'b1;
    end
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL not a bijection, outputs seen=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
