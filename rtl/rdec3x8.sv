// rdec3x8: reversible 3-to-8 decoder.
//
// out[i] is 1 exactly when in == i. A 2x4 decoder decodes the two MSBs;
// then one Fredkin gate per 2x4 output splits that line by the LSB. Each
// Fredkin gate gets (A = in[0], B = 0, C = line k) and yields
// Q = in[0]·line k on out[2k+1] and R = in[0]'·line k on out[2k]; its P
// output is a garbage copy of in[0]. This two-stage structure, and the
// 4 Fredkin gates, are the published construction. Quantum cost
// 11 + 4 x 5 = 31. Combinational; no clock or reset.
module rdec3x8 (
  input  logic [2:0] in,
  output logic [7:0] out
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = qc_decoder(3);

  logic [3:0] hi;     // one-hot decode of in[2:1]
  logic [3:0] g_sel;  // garbage: copies of in[0]

  rdec2x4 u_dec (.in(in[2:1]), .out(hi));

  for (genvar k = 0; k < 4; k++) begin : g_split
    rg_fredkin u_fg (.a(in[0]), .b(1'b0), .c(hi[k]),
                     .p(g_sel[k]), .q(out[2*k+1]), .r(out[2*k]));
  end
endmodule
