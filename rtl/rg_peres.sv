// rg_peres: 3x3 Peres gate.
//
// P = A, Q = A xor B, R = AB xor C. With C = 0 it yields A xor B and AB in
// one gate of quantum cost 4, which the 2x4 decoder uses. The functions are
// the gate's truth table; they are the standard Peres gate.
// Combinational; no clock or reset.
module rg_peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
