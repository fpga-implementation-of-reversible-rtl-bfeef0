// rev_pkg: shared constants and cost formulas for the reversible
// adder/subtractor.
//
// The per-gate quantum costs (Double Feynman gate 2, HNG 6) and the
// closed-form costs of an N-bit adder/subtractor (gates N + N/2, garbage
// outputs 2N+1, ancilla inputs N, quantum cost 7N) are the published
// figures for this structure. The functions let the top export its own
// cost as parameters so a testbench can hold the netlist against them.
package rev_pkg;

  // Quantum cost of one gate of each type.
  localparam int unsigned F2G_QUANTUM_COST = 2;
  localparam int unsigned HNG_QUANTUM_COST = 6;

  // Number of reversible gates: N HNG full adders plus N/2 Double Feynman
  // gates, each of which conditions two bits of B.
  function automatic int unsigned gate_count(int unsigned n);
    return n + n / 2;
  endfunction

  // Garbage outputs: W and X of every HNG, plus the Ctrl copy leaving the
  // last Double Feynman gate.
  function automatic int unsigned garbage_outputs(int unsigned n);
    return 2 * n + 1;
  endfunction

  // Ancilla (constant) inputs: the D input of every HNG, held at 0.
  function automatic int unsigned ancilla_inputs(int unsigned n);
    return n;
  endfunction

  // Quantum cost: 6 per HNG and 2 per Double Feynman gate, i.e. 7N.
  function automatic int unsigned quantum_cost(int unsigned n);
    return n * HNG_QUANTUM_COST + (n / 2) * F2G_QUANTUM_COST;
  endfunction

endpackage
