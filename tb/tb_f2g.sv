// tb_f2g: exhaustive self-checking test of the Double Feynman gate.
//
// All 8 input vectors are applied. Each output is compared with a truth
// table written out by hand (not with the gate's equations), the 8 output
// vectors are checked to be all different (the gate is reversible), and a
// second gate fed with the first gate's outputs must give back the inputs
// (the gate is its own inverse).
module tb_f2g;

  logic a, b, c;
  logic w, x, y;
  logic w2, x2, y2;
  int   checks = 0;
  int   failures = 0;

  // Expected {w,x,y} for input {a,b,c} = 0..7.
  localparam logic [2:0] EXPECTED [8] = '{
    3'b000, 3'b001, 3'b010, 3'b011,   // a = 0: buffer
    3'b111, 3'b110, 3'b101, 3'b100    // a = 1: invert b and c
  };

  f2g dut  (.a(a), .b(b), .c(c), .w(w), .x(x), .y(y));
  f2g dut2 (.a(w), .b(x), .c(y), .w(w2), .x(x2), .y(y2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] seen;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({w, x, y} !== EXPECTED[v]) begin
        failures++;
        $display("FAIL in=%03b out=%03b expected=%03b", 3'(v), {w, x, y}, EXPECTED[v]);
      end
      checks++;
      if ({w2, x2, y2} !== 3'(v)) begin
        failures++;
        $display("FAIL self-inverse in=%03b back=%03b", 3'(v), {w2, x2, y2});
      end
      seen[{w, x, y}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL not a bijection, outputs seen=%b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
