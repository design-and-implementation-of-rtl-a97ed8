// rcomparator: reversible 1-bit magnitude comparator.
//
// A 2-to-4 decoder on {a, b} already yields a'b (a < b) and ab' (a > b);
// one Fredkin OR of a'b' and ab gives a == b. Exactly one output is high.
// Quantum cost 11 + 5 = 16, which matches the published cost of the binary
// comparator; the published work gives no structure, so this one is this
// design's. Combinational; no clock or reset.
module rcomparator (
  input  logic a,
  input  logic b,
  output logic lt,   // a < b
  output logic eq,   // a == b
  output logic gt    // a > b
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = QC_DEC2X4 + QC_FREDKIN;

  logic [3:0] m;     // minterms of {a, b}

  rdec2x4 u_dec (.in({a, b}), .out(m));

  assign lt = m[1];
  assign gt = m[2];
  rg_or u_eq (.a(m[0]), .b(m[3]), .y(eq));
endmodule
