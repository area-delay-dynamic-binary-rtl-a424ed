// qca_pkg: constants and helpers shared by the QCA novel-adder modules.
//
// The adder is written as a netlist of three-input majority gates (MG) and
// inverters, the two primitives of quantum-dot cellular automata. In a QCA
// layout every cascaded MG costs one clock phase, and four phases make one
// QCA clock cycle. The latency below counts, for an n-bit adder, one phase
// for input acquisition, two for the least significant 2-bit module (AND
// for g0, then one MG), one per remaining 2-bit module ((n-2)/2 phases) and
// two for the sum MGs: n/2 + 4 phases. That reproduces 20 phases (five
// cycles) at 32 bits and 36 phases (nine cycles) at 64 bits.
package qca_pkg;

  localparam int unsigned PHASES_PER_CYCLE = 4;

  // Clock phases from operand acquisition to a valid sum, n-bit adder.
  function automatic int unsigned latency_phases(int unsigned n);
    return n / 2 + 4;
  endfunction

  // Same latency in whole QCA clock cycles (rounded up).
  function automatic int unsigned latency_cycles(int unsigned n);
    return (latency_phases(n) + PHASES_PER_CYCLE - 1) / PHASES_PER_CYCLE;
  endfunction

  // Majority of three bits, for reference models.
  function automatic logic maj3(logic a, logic b, logic c);
    return (a & b) | (b & c) | (a & c);
  endfunction

endpackage
