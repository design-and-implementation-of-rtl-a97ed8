// renc: reversible 2**OUT_W-to-OUT_W encoder (16x4 by default).
//
// For a one-hot input in[i], out = i. Output bit k is the XOR of every
// input whose index has bit k set: with exactly one input high, that XOR
// equals the OR a conventional encoder would use, and XOR is what a
// Feynman (CNOT) gate computes reversibly. Each output bit is a chain of
// 2**(OUT_W-1) - 1 Feynman gates, the running parity on the target line and
// one input on the control line; the control outputs are garbage copies.
// OUT_W = 2 and 3 give the 4x2 and 8x3 encoders.
//
// The published 16x4 encoder mixes Feynman and Fredkin gates (quantum cost
// 48); this Feynman-only structure, of cost OUT_W * (2**(OUT_W-1) - 1) = 28
// for OUT_W = 4, is this design's own. Inputs that are not one-hot give the
// XOR of the active inputs' indices. Combinational; no clock or reset.
module renc #(
  parameter int unsigned OUT_W = 4
) (
  input  logic [2**OUT_W-1:0] in,
  output logic [OUT_W-1:0]    out
);
  import rev_pkg::*;
  localparam int unsigned N_IN  = 2 ** OUT_W;
  localparam int unsigned N_SET = N_IN / 2;   // inputs with a given bit set
  localparam int unsigned QUANTUM_COST = OUT_W * (N_SET - 1) * QC_FEYNMAN;

  // Index of the j-th input whose index has bit k set: bit k inserted as a
  // 1 into j.
  function automatic int unsigned set_index(int unsigned k, int unsigned j);
    return ((j >> k) << (k + 1)) | (1 << k) | (j & ((1 << k) - 1));
  endfunction

  for (genvar k = 0; k < OUT_W; k++) begin : g_bit
    logic [N_SET-1:0] parity;   // running XOR along the chain
    logic [N_SET-1:0] g_ctl;    // garbage: control outputs of the gates

    assign parity[0] = in[set_index(k, 0)];
    assign g_ctl[0]  = 1'b0;
    for (genvar j = 1; j < N_SET; j++) begin : g_fg
      rg_feynman u_fg (.a(in[set_index(k, j)]), .b(parity[j-1]),
                       .p(g_ctl[j]), .q(parity[j]));
    end
    assign out[k] = parity[N_SET-1];
  end
endmodule
