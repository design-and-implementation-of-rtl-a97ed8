// rg_fredkin: 3x3 Fredkin gate (controlled swap).
//
// P = A, Q = A'B xor AC, R = A'C xor AB: when A is 0, B and C pass straight
// through; when A is 1 they swap. Quantum cost 5. With one data input tied
// to a constant it forms AND (C = 0, R = AB) or OR (C = 1, Q = A + B), and
// with B = 0 it splits C into A·C and A'·C, which the decoders use.
// Combinational; no clock or reset.
module rg_fredkin (
  input  logic a,   // control
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
