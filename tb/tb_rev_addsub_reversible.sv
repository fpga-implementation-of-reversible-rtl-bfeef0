// tb_rev_addsub_reversible: checks that the adder/subtractor is reversible.
//
// With the ancilla inputs at 0, a reversible circuit must map distinct
// inputs to distinct outputs: the garbage outputs carry exactly the
// information the sum throws away. A 4-bit instance is driven with all
// 2^10 combinations of a, b, ctrl and cin; every output word
// {s, cout, garbage_a, garbage_b, garbage_ctrl} must be new, and a, b and
// ctrl must be recoverable from the garbage outputs. The arithmetic result
// is checked as well.
module tb_rev_addsub_reversible;

  localparam int unsigned N = 4;
  localparam int unsigned IN_BITS  = 2 * N + 2;
  localparam int unsigned OUT_BITS = 3 * N + 2;

  logic [N-1:0] a, b, s, ga, gb;
  logic         ctrl, cin, cout, gctrl;
  int           checks = 0;
  int           failures = 0;

  rev_addsub #(.N(N)) dut (
    .a(a), .b(b), .ctrl(ctrl), .cin(cin), .s(s), .cout(cout),
    .garbage_a(ga), .garbage_b(gb), .garbage_ctrl(gctrl)
  );

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen [logic [OUT_BITS-1:0]];
    logic [OUT_BITS-1:0] word;
    int expected;
    for (int v = 0; v < (1 << IN_BITS); v++) begin
      {ctrl, cin, a, b} = IN_BITS'(v);
      #1;
      word = {s, cout, ga, gb, gctrl};
      checks++;
      if (seen.exists(word)) begin
        failures++;
        $display("FAIL output %h repeats for input %h", word, v);
      end
      seen[word] = 1'b1;
      // Recover the inputs from the outputs.
      checks++;
      if (ga !== a || (gctrl ? ~gb : gb) !== b || gctrl !== ctrl) begin
        failures++;
        $display("FAIL cannot recover inputs from garbage for input %h", v);
      end
      expected = int'(a) + (ctrl ? (2**N - 1) - int'(b) : int'(b)) + int'(cin);
      checks++;
      if ({cout, s} !== (N+1)'(expected)) begin
        failures++;
        $display("FAIL a=%h b=%h ctrl=%b cin=%b got %b_%h", a, b, ctrl, cin, cout, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
