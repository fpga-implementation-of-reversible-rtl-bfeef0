// hng: HNG gate, a 4-input/4-output reversible gate that works as a full
// adder.
//
// Mapping: W = A, X = B, Y = A ^ B ^ C, Z = ((A ^ B) & C) ^ (A & B) ^ D.
// With the ancilla input D held at 0, Y is the full-adder sum of A, B and
// carry-in C, and Z is the carry out (the majority of A, B, C). W and X are
// garbage outputs that make the gate reversible. Quantum cost 6.
//
// Purely combinational, no clock. The mapping is the published one; the
// port names are lower-case versions of the gate's pin names.
module hng (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic w,
  output logic x,
  output logic y,
  output logic z
);

  logic p;  // propagate, A ^ B

  assign p = a ^ b;
  assign w = a;
  assign x = b;
  assign y = p ^ c;
  assign z = (p & c) ^ (a & b) ^ d;

endmodule
