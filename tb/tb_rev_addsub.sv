// tb_rev_addsub: end-to-end test of the 16-bit reversible adder/subtractor
// at its default width.
//
// Phase 1 applies the ten operand sets of the board experiments (seven
// additions with cin = 0 and 1, four subtractions with ctrl = cin = 1) and
// compares the result with its decimal value. Phase 2 applies 20000 random
// operands in both modes and compares with a + b + cin or a - b computed in
// wider integers. The garbage outputs are checked too (a, the conditioned
// b, and the Ctrl copy at the end of the Double Feynman row), and the
// circuit's cost parameters are compared with 24 gates, 33 garbage
// outputs, 16 ancilla inputs and quantum cost 112.
//
// Each mechanism is counted: addition with cin = 0, addition with cin = 1,
// subtraction, a carry out of an addition, a borrow (cout = 0) and no
// borrow in a subtraction, and a carry rippling through all 16 bits. A
// mechanism that never happened counts as a failure.
module tb_rev_addsub;

  logic [15:0] a, b, s, ga, gb;
  logic        ctrl, cin, cout, gctrl;
  int          checks = 0;
  int          failures = 0;

  int n_add_cin0 = 0, n_add_cin1 = 0, n_sub = 0;
  int n_add_carry = 0, n_sub_borrow = 0, n_sub_no_borrow = 0, n_full_ripple = 0;

  rev_addsub dut (
    .a(a), .b(b), .ctrl(ctrl), .cin(cin), .s(s), .cout(cout),
    .garbage_a(ga), .garbage_b(gb), .garbage_ctrl(gctrl)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply one operation and check every output against a model that uses
  // integer arithmetic only.
  task automatic apply(input logic [15:0] x, input logic [15:0] y,
                       input logic c, input logic ci);
    int unsigned wide;
    logic [16:0] expected;
    a = x; b = y; ctrl = c; cin = ci;
    #1;
    if (!c) wide = int'(x) + int'(y) + int'(ci);
    else    wide = int'(x) + (32'h0000_FFFF - int'(y)) + int'(ci);
    expected = 17'(wide);
    checks++;
    if ({cout, s} !== expected) begin
      failures++;
      $display("FAIL a=%h b=%h ctrl=%b cin=%b got cout=%b s=%h expected cout=%b s=%h",
               x, y, c, ci, cout, s, expected[16], expected[15:0]);
    end
    checks++;
    if (ga !== x || gb !== (c ? ~y : y) || gctrl !== c) begin
      failures++;
      $display("FAIL garbage a=%h b=%h ctrl=%b got ga=%h gb=%h gctrl=%b", x, y, c, ga, gb, gctrl);
    end
    if (!c && !ci) n_add_cin0++;
    if (!c &&  ci) n_add_cin1++;
    if (c) n_sub++;
    if (!c && cout) n_add_carry++;
    if (c && ci && !cout) n_sub_borrow++;
    if (c && ci && cout) n_sub_no_borrow++;
    // Every bit propagates and a carry enters: the carry crosses all 16 HNGs.
    if ((x ^ (c ? ~y : y)) == 16'hFFFF && ci) n_full_ripple++;
  endtask

  // Board experiment: operands in hexadecimal, result read back in decimal.
  task automatic board(input logic [15:0] x, input logic [15:0] y,
                       input logic c, input logic ci, input int unsigned dec);
    apply(x, y, c, ci);
    checks++;
    if (int'(s) != dec) begin
      failures++;
      $display("FAIL board a=%h b=%h ctrl=%b cin=%b got %0d expected %0d", x, y, c, ci, s, dec);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end else begin
      $display("%s: %0d", what, count);
    end
  endtask

  initial begin
    // Cost of the built circuit against the published figures for 16 bits.
    checks++;
    if (dut.GATE_COUNT != 24 || dut.GARBAGE_OUTPUTS != 33 ||
        dut.ANCILLA_INPUTS != 16 || dut.QUANTUM_COST != 112) begin
      failures++;
      $display("FAIL cost gates=%0d garbage=%0d ancilla=%0d qc=%0d",
               dut.GATE_COUNT, dut.GARBAGE_OUTPUTS, dut.ANCILLA_INPUTS, dut.QUANTUM_COST);
    end

    // Phase 1: the board experiments.
    board(16'h0042, 16'h0016, 1'b0, 1'b0, 88);
    board(16'h0042, 16'h0016, 1'b0, 1'b1, 89);
    board(16'h127D, 16'h0123, 1'b0, 1'b0, 5024);
    board(16'h127D, 16'h0123, 1'b0, 1'b1, 5025);
    board(16'h34FF, 16'h12AA, 1'b0, 1'b0, 18345);
    board(16'h34FF, 16'h12AA, 1'b0, 1'b1, 18346);
    board(16'h0097, 16'h0077, 1'b1, 1'b1, 32);
    board(16'h0A28, 16'h0200, 1'b1, 1'b1, 2088);
    board(16'h0BC9, 16'h0AB8, 1'b1, 1'b1, 273);
    board(16'hFFFF, 16'hDCBA, 1'b1, 1'b1, 9029);

    // Corner cases: full carry ripple, borrow, equal operands.
    apply(16'hFFFF, 16'h0000, 1'b0, 1'b1);
    apply(16'h0005, 16'h0007, 1'b1, 1'b1);
    apply(16'h1234, 16'h1234, 1'b1, 1'b1);

    // Phase 2: random operands in both modes; subtraction always with cin = 1.
    for (int i = 0; i < 20000; i++) begin
      logic c;
      c = 1'($urandom);
      apply(16'($urandom), 16'($urandom), c, c ? 1'b1 : 1'($urandom));
    end

    need("addition, cin=0", n_add_cin0);
    need("addition, cin=1", n_add_cin1);
    need("subtraction", n_sub);
    need("carry out of an addition", n_add_carry);
    need("borrow in a subtraction", n_sub_borrow);
    need("no borrow in a subtraction", n_sub_no_borrow);
    need("carry through all 16 bits", n_full_ripple);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
