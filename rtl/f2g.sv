// f2g: Double Feynman gate, a 3-input/3-output reversible gate.
//
// Mapping: W = A, X = A ^ B, Y = A ^ C. It is its own inverse: applying it
// twice returns the inputs. In the adder/subtractor A carries the Ctrl
// (add/subtract) signal and B, C carry two bits of operand B, so the gate is
// a buffer for both bits when Ctrl = 0 and an inverter when Ctrl = 1; W
// passes Ctrl on to the next gate. Quantum cost 2.
//
// Purely combinational, no clock. The mapping is the published one; the
// port names are lower-case versions of the gate's pin names.
module f2g (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic w,
  output logic x,
  output logic y
);

  assign w = a;
  assign x = a ^ b;
  assign y = a ^ c;

endmodule
