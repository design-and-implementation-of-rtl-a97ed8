// rmux4x1: reversible 4-to-1 multiplexer built on a 2-to-4 decoder.
//
// The decoder turns the select lines {c1, c0} into one-hot enables; four
// Fredkin AND gates pass only the selected data bit, and a tree of three
// Fredkin OR gates merges the four AND outputs into y. This decoder/AND/OR
// structure is the published one (quantum cost 11 + 4 x 5 + 3 x 5 = 46);
// the published single 4-input OR is built here as a 2-level tree.
// Combinational; no clock or reset.
module rmux4x1 (
  input  logic [3:0] in,    // data i0..i3
  input  logic [1:0] sel,   // {c1, c0}
  output logic       y      // in[sel]
);
  import rev_pkg::*;
  localparam int unsigned QUANTUM_COST = QC_DEC2X4 + 7 * QC_FREDKIN;

  logic [3:0] en;           // one-hot select
  logic [3:0] gated;        // in[i] & en[i]
  logic [1:0] merged;

  rdec2x4 u_dec (.in(sel), .out(en));

  for (genvar i = 0; i < 4; i++) begin : g_and
    rg_and u_and (.a(en[i]), .b(in[i]), .y(gated[i]));
  end

  rg_or u_or0 (.a(gated[0]),  .b(gated[1]),  .y(merged[0]));
  rg_or u_or1 (.a(gated[2]),  .b(gated[3]),  .y(merged[1]));
  rg_or u_or2 (.a(merged[0]), .b(merged[1]), .y(y));
endmodule
