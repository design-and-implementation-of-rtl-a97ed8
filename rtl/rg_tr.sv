// rg_tr: 3x3 TR gate.
//
// P = A, Q = A xor B, R = AB' xor C. With C = 0 it yields A xor B and AB'
// in one gate of quantum cost 4; the 2x4 decoder takes its one-hot line for
// input value 2 from R. The functions are the gate's truth table.
// Combinational; no clock or reset.
module rg_tr (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
