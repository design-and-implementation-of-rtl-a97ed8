// rev_pkg: quantum costs of the reversible primitive gates.
//
// Every reversible module in this library exports a QUANTUM_COST
// localparam, summed from these per-gate costs, so a testbench (or a
// designer comparing variants) can read the cost of a circuit off the
// elaborated hierarchy. The costs are the usual literature values: NOT 0,
// Feynman (CNOT) 1, Fredkin 5, Peres 4, TR 4. Nothing here is hardware.
package rev_pkg;

  localparam int unsigned QC_NOT     = 0;
  localparam int unsigned QC_FEYNMAN = 1;
  localparam int unsigned QC_FREDKIN = 5;
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_TR      = 4;

  // A 2x4 decoder is one Peres, one TR, one NOT and three CNOT gates.
  localparam int unsigned QC_DEC2X4 = QC_PERES + QC_TR + QC_NOT + 3 * QC_FEYNMAN;

  // Each further decoder stage doubles the outputs with one Fredkin gate per
  // output of the previous stage: QC(n) = QC(n-1) + 5 * 2**(n-1).
  function automatic int unsigned qc_decoder(int unsigned n);
    int unsigned qc = QC_DEC2X4;
    for (int unsigned k = 3; k <= n; k++) qc += QC_FREDKIN * (1 << (k - 1));
    return qc;
  endfunction

endpackage
