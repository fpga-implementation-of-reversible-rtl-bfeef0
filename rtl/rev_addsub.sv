// rev_addsub: N-bit reversible adder/subtractor (N = 16 by default).
//
// The circuit is built only from reversible gates. N/2 Double Feynman gates
// (f2g) form a controlled inverter for operand B: each gate takes Ctrl on
// its A input and two bits of B on its B and C inputs, so it passes both
// bits unchanged when ctrl = 0 and inverts both when ctrl = 1. The W output
// of each gate, a copy of Ctrl, feeds the A input of the next gate, so Ctrl
// ripples through the whole row. N HNG gates (hng_ripple_adder) then add A,
// the conditioned B and cin as a ripple-carry adder.
//
//   ctrl = 0:           s = a + b + cin          (adder)
//   ctrl = 1, cin = 1:  s = a + ~b + 1 = a - b   (two's-complement subtractor)
//
// cout is the carry out of the top bit; in subtraction it is 1 when a >= b
// (no borrow). The garbage outputs that make the circuit reversible are
// brought out: garbage_a and garbage_b (W and X of each HNG, i.e. a and the
// conditioned b) and garbage_ctrl (the Ctrl copy leaving the last Double
// Feynman gate), 2N+1 bits in all. The N ancilla inputs are the HNG D pins,
// tied to 0 inside.
//
// Purely combinational, no clock or reset: the result settles after the
// Ctrl ripple through the f2g row and the carry ripple through N HNGs.
//
// The gate structure, the pairing of two B bits per Double Feynman gate and
// the cost figures follow the published design. Bit k of B going to HNG k,
// the Ctrl chain running in bit order, and cin being a primary input of its
// own (rather than wired to ctrl) are this design's choices; for
// subtraction, drive cin = 1 together with ctrl = 1. N must be even.
module rev_addsub
  import rev_pkg::*;
#(
  parameter  int unsigned N               = 16,
  // Cost of the circuit as built, in the usual reversible-logic measures.
  localparam int unsigned GATE_COUNT      = gate_count(N),
  localparam int unsigned GARBAGE_OUTPUTS = garbage_outputs(N),
  localparam int unsigned ANCILLA_INPUTS  = ancilla_inputs(N),
  localparam int unsigned QUANTUM_COST    = quantum_cost(N)
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         ctrl,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout,
  output logic [N-1:0] garbage_a,
  output logic [N-1:0] garbage_b,
  output logic         garbage_ctrl
);

  if (N < 2 || N % 2 != 0) begin : g_bad_width
    $error("rev_addsub: N must be even and at least 2");
  end

  localparam int unsigned PAIRS = N / 2;

  logic [PAIRS:0] ctrl_chain;  // Ctrl entering each Double Feynman gate
  logic [N-1:0]   b_cond;      // b, inverted when ctrl = 1

  assign ctrl_chain[0] = ctrl;

  for (genvar k = 0; k < PAIRS; k++) begin : g_f2g
    f2g u_f2g (
      .a (ctrl_chain[k]),
      .b (b[2*k]),
      .c (b[2*k+1]),
      .w (ctrl_chain[k+1]),
      .x (b_cond[2*k]),
      .y (b_cond[2*k+1])
    );
  end

  assign garbage_ctrl = ctrl_chain[PAIRS];

  hng_ripple_adder #(.N(N)) u_adder (
    .a         (a),
    .b         (b_cond),
    .cin       (cin),
    .sum       (s),
    .cout      (cout),
    .garbage_a (garbage_a),
    .garbage_b (garbage_b)
  );

endmodule
