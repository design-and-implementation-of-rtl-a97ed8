// rdec2x4: reversible 2-to-4 decoder.
//
// out[i] is 1 exactly when in == i. Built from six reversible gates
// (quantum cost 11): with A = in[1] and B = in[0],
//   Peres(A, B, 0)  gives A xor B and AB,
//   TR(A, B, 0)     gives A xor B and AB',
//   CNOT(AB', A^B)  passes AB'                     -> out[2]
//                   and turns A xor B into A'B     -> out[1],
//   CNOT(AB, 0)     copies AB                      -> out[3],
//   NOT(A^B)        gives A'B' + AB, and
//   CNOT(AB, that)  clears the AB term             -> out[0].
// The gate list (one Peres, one TR, one NOT, three CNOT) and which branch
// feeds which output follow the published decoder; which Peres output goes
// into the NOT gate is this design's reading of it. Apart from the two
// primary inputs, every gate output drives exactly one place (no fan-out),
// as reversible logic requires. Unused gate outputs are garbage lines named
// g_*. Combinational; no clock or reset.
module rdec2x4 (
  input  logic [1:0] in,
  output logic [3:0] out
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = QC_DEC2X4;

  logic a_xor_b, ab, ab_copy, xnor_ab;   // Peres branch
  logic tr_xor, tr_abn;                  // TR branch
  logic g_pg_p, g_tr_p, g_cn_p;          // garbage outputs

  rg_peres   u_pg  (.a(in[1]), .b(in[0]), .c(1'b0),
                    .p(g_pg_p), .q(a_xor_b), .r(ab));
  rg_tr      u_tr  (.a(in[1]), .b(in[0]), .c(1'b0),
                    .p(g_tr_p), .q(tr_xor), .r(tr_abn));
  rg_feynman u_cn1 (.a(tr_abn), .b(tr_xor), .p(out[2]), .q(out[1]));
  rg_feynman u_cn2 (.a(ab), .b(1'b0), .p(out[3]), .q(ab_copy));
  rg_not     u_not (.a(a_xor_b), .p(xnor_ab));
  rg_feynman u_cn3 (.a(ab_copy), .b(xnor_ab), .p(g_cn_p), .q(out[0]));
endmodule
