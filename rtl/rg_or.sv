// rg_or: two-input OR built from one Fredkin gate.
//
// The Fredkin gate's C input is tied to 1, so Q = A'B xor A = A + B. The
// other two outputs (P = A and R = A' xor AB) are garbage lines.
// Quantum cost 5. Combinational.
module rg_or (
  input  logic a,
  input  logic b,
  output logic y
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = QC_FREDKIN;

  logic g_p, g_r;   // garbage outputs

  rg_fredkin u_fg (.a(a), .b(b), .c(1'b1), .p(g_p), .q(y), .r(g_r));
endmodule
