// rdec4x16: reversible 4-to-16 decoder.
//
// out[i] is 1 exactly when in == i. A 3x8 decoder decodes in[3:1]; then
// eight Fredkin gates split each of its lines by in[0], exactly as the 3x8
// decoder splits the lines of its 2x4 decoder: Fredkin(A = in[0], B = 0,
// C = line k) gives out[2k+1] = in[0]·line k and out[2k] = in[0]'·line k.
// In all 18 gates: 12 Fredkin, one Peres, one TR, one NOT and three CNOT,
// quantum cost 31 + 8 x 5 = 71, as published. Combinational; no clock or
// reset.
module rdec4x16 (
  input  logic [3:0]  in,
  output logic [15:0] out
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = qc_decoder(4);

  logic [7:0] hi;     // one-hot decode of in[3:1]
  logic [7:0] g_sel;  // garbage: copies of in[0]

  rdec3x8 u_dec (.in(in[3:1]), .out(hi));

  for (genvar k = 0; k < 8; k++) begin : g_split
    rg_fredkin u_fg (.a(in[0]), .b(1'b0), .c(hi[k]),
                     .p(g_sel[k]), .q(out[2*k+1]), .r(out[2*k]));
  end
endmodule
