// hng_ripple_adder: N-bit ripple-carry adder made of N HNG gates.
//
// Gate i takes A = a[i], B = b[i], C = carry into bit i and the ancilla
// D = 0; its Y output is sum bit i and its Z output is the carry into bit
// i+1. The carry into bit 0 is cin, the carry out of bit N-1 is cout. The
// W and X outputs of every gate (copies of a[i] and b[i]) are garbage
// outputs of the reversible circuit and are brought out on garbage_a and
// garbage_b so that nothing of the gate is discarded inside the module.
//
// Purely combinational; the delay is a ripple through N carry stages. The
// chain of HNG gates with constant-0 D inputs follows the published
// structure; bringing the garbage outputs out as ports is this design's
// choice.
module hng_ripple_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout,
  output logic [N-1:0] garbage_a,
  output logic [N-1:0] garbage_b
);

  logic [N:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    hng u_hng (
      .a (a[i]),
      .b (b[i]),
      .c (carry[i]),
      .d (1'b0),
      .w (garbage_a[i]),
      .x (garbage_b[i]),
      .y (sum[i]),
      .z (carry[i+1])
    );
  end

  assign cout = carry[N];

endmodule
