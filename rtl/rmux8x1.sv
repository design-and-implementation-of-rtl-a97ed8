// rmux8x1: reversible 8-to-1 multiplexer built on a 3-to-8 decoder.
//
// The decoder turns sel into eight one-hot enables; eight Fredkin AND
// gates pass only the selected data bit and a 3-level tree of seven
// Fredkin OR gates merges them into y: 16 cells, as in the published
// implementation. Its quantum cost is 31 + 15 x 5 = 106, above the 75
// published for the 8x1 multiplexer, which this cell count cannot reach.
// Combinational; no clock or reset.
module rmux8x1 (
  input  logic [7:0] in,
  input  logic [2:0] sel,
  output logic       y      // in[sel]
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = qc_decoder(3) + 15 * QC_FREDKIN;

  logic [7:0] en;           // one-hot select
  logic [7:0] gated;        // in[i] & en[i]
  logic [3:0] lvl1;
  logic [1:0] lvl2;

  rdec3x8 u_dec (.in(sel), .out(en));

  for (genvar i = 0; i < 8; i++) begin : g_and
    rg_and u_and (.a(en[i]), .b(in[i]), .y(gated[i]));
  end

  for (genvar i = 0; i < 4; i++) begin : g_or1
    rg_or u_or (.a(gated[2*i]), .b(gated[2*i+1]), .y(lvl1[i]));
  end
  for (genvar i = 0; i < 2; i++) begin : g_or2
    rg_or u_or (.a(lvl1[2*i]), .b(lvl1[2*i+1]), .y(lvl2[i]));
  end
  rg_or u_or3 (.a(lvl2[0]), .b(lvl2[1]), .y(y));
endmodule
