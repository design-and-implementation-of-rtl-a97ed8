// rg_not: 1x1 reversible NOT gate, P = A'.
//
// The simplest reversible gate: one input, one output, quantum cost 0.
// Combinational; no clock or reset.
module rg_not (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
