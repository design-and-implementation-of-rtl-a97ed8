// rg_feynman: 2x2 Feynman (controlled-NOT) gate.
//
// P = A, Q = A xor B. With B tied to 0 it copies A onto two lines, which is
// how reversible circuits get fan-out: a plain wire may not drive two gate
// inputs. Quantum cost 1. Combinational; no clock or reset.
module rg_feynman (
  input  logic a,   // control
  input  logic b,   // target
  output logic p,   // = a
  output logic q    // = a ^ b
);
  assign p = a;
  assign q = a ^ b;
endmodule
