// rfull_subtractor: reversible full subtractor built on a 3-to-8 decoder.
//
// Computes a - b - bin. The decoder turns {a, b, bin} into minterms m0..m7
// and two trees of Fredkin OR gates collect them:
//   diff[0] (difference) = m1 + m2 + m4 + m7
//   diff[1] (borrow out) = m1 + m2 + m3 + m7
// Only the existence of a decoder-based full subtractor is published (with
// quantum cost 63); this structure mirrors the full adder and costs
// 31 + 6 x 5 = 61. Minterms shared by both trees feed both directly.
// Combinational; no clock or reset.
module rfull_subtractor (
  input  logic [2:0] in,    // {a (minuend), b (subtrahend), bin}
  output logic [1:0] diff   // {borrow out, difference}
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = qc_decoder(3) + 6 * QC_FREDKIN;

  logic [7:0] m;            // minterms
  logic d_lo, d_hi, b_lo, b_hi;

  rdec3x8 u_dec (.in(in), .out(m));

  rg_or u_d0 (.a(m[1]), .b(m[2]), .y(d_lo));
  rg_or u_d1 (.a(m[4]), .b(m[7]), .y(d_hi));
  rg_or u_d2 (.a(d_lo), .b(d_hi), .y(diff[0]));
  rg_or u_b0 (.a(m[1]), .b(m[2]), .y(b_lo));
  rg_or u_b1 (.a(m[3]), .b(m[7]), .y(b_hi));
  rg_or u_b2 (.a(b_lo), .b(b_hi), .y(diff[1]));
endmodule
