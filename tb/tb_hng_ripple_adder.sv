// tb_hng_ripple_adder: self-checking test of the HNG ripple-carry adder.
//
// A 16-bit instance (the default width) gets corner cases (full carry
// ripple, all ones, zero) and 20000 random operand pairs with both carry-in
// values; a 4-bit instance is tested exhaustively. {cout, sum} is compared
// with a + b + cin computed in a wider integer, and the garbage outputs
// with the operands they copy.
module tb_hng_ripple_adder;

  localparam int unsigned NW = 16;
  localparam int unsigned NS = 4;

  logic [NW-1:0] a16, b16, s16, ga16, gb16;
  logic          cin16, cout16;
  logic [NS-1:0] a4, b4, s4, ga4, gb4;
  logic          cin4, cout4;
  int            checks = 0;
  int            failures = 0;

  hng_ripple_adder dut16 (
    .a(a16), .b(b16), .cin(cin16), .sum(s16), .cout(cout16),
    .garbage_a(ga16), .garbage_b(gb16)
  );

  hng_ripple_adder #(.N(NS)) dut4 (
    .a(a4), .b(b4), .cin(cin4), .sum(s4), .cout(cout4),
    .garbage_a(ga4), .garbage_b(gb4)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [NW-1:0] x, input logic [NW-1:0] y, input logic ci);
    longint unsigned expected;
    a16 = x; b16 = y; cin16 = ci;
    #1;
    expected = longint'(x) + longint'(y) + longint'(ci);
    checks++;
    if ({cout16, s16} !== (NW+1)'(expected) || ga16 !== x || gb16 !== y) begin
      failures++;
      $display("FAIL N=16 a=%h b=%h cin=%b got cout=%b sum=%h expected %h",
               x, y, ci, cout16, s16, expected);
    end
  endtask

  initial begin
    check16(16'hFFFF, 16'h0001, 1'b0);
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hFFFF, 16'hFFFF, 1'b1);
    check16(16'h0000, 16'h0000, 1'b0);
    check16(16'h8000, 16'h8000, 1'b0);
    check16(16'h5555, 16'hAAAA, 1'b1);
    for (int i = 0; i < 20000; i++) begin
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    end
    for (int v = 0; v < (1 << (2 * NS + 1)); v++) begin
      int expected;
      {cin4, a4, b4} = (2*NS+1)'(v);
      #1;
      expected = int'(a4) + int'(b4) + int'(cin4);
      checks++;
      if ({cout4, s4} !== (NS+1)'(expected) || ga4 !== a4 || gb4 !== b4) begin
        failures++;
        $display("FAIL N=4 a=%h b=%h cin=%b got cout=%b sum=%h", a4, b4, cin4, cout4, s4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
