// rg_and: two-input AND built from one Fredkin gate.
//
// The Fredkin gate's C input is tied to 0, so R = A'·0 xor A·B = AB. The
// other two outputs (P = A and Q = A'B) are garbage lines: they exist only
// to keep the gate reversible and are not used. Quantum cost 5.
// Port names a, b, y mirror those of rg_or. Combinational.
module rg_and (
  input  logic a,
  input  logic b,
  output logic y
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = QC_FREDKIN;

  logic g_p, g_q;   // garbage outputs

  rg_fredkin u_fg (.a(a), .b(b), .c(1'b0), .p(g_p), .q(g_q), .r(y));
endmodule
