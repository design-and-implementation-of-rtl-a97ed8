// rfull_adder: reversible full adder built on a 3-to-8 decoder.
//
// The decoder turns {a, b, cin} into its eight minterms m0..m7; two trees
// of Fredkin OR gates then collect the minterms of each output:
//   sum[0] (sum)   = m1 + m2 + m4 + m7   (OR cells r2, r3 -> r4)
//   sum[1] (carry) = m3 + m5 + m6 + m7   (OR cells r5, r6 -> r7)
// One decoder and six OR cells, quantum cost 31 + 6 x 5 = 61, follow the
// published adder; the minterm-to-cell assignment is this design's. m7
// feeds both trees directly. Combinational; no clock or reset.
module rfull_adder (
  input  logic [2:0] in,    // {a, b, cin}; the function is symmetric
  output logic [1:0] sum    // {carry, sum}
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = qc_decoder(3) + 6 * QC_FREDKIN;

  logic [7:0] m;            // minterms
  logic r2, r3, r5, r6;

  rdec3x8 r1 (.in(in), .out(m));

  rg_or u_r2 (.a(m[1]), .b(m[2]), .y(r2));
  rg_or u_r3 (.a(m[4]), .b(m[7]), .y(r3));
  rg_or u_r4 (.a(r2),   .b(r3),   .y(sum[0]));
  rg_or u_r5 (.a(m[3]), .b(m[5]), .y(r5));
  rg_or u_r6 (.a(m[6]), .b(m[7]), .y(r6));
  rg_or u_r7 (.a(r5),   .b(r6),   .y(sum[1]));
endmodule
