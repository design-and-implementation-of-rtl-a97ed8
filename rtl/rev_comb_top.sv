// rev_comb_top: the reversible combinational circuits side by side.
//
// The library's circuits are independent: a 4x16 decoder, a 16x4 encoder,
// a full adder, a full subtractor, a 1-bit comparator and 4x1 and 8x1
// multiplexers, each built only from reversible gates (NOT, Feynman,
// Fredkin, Peres, TR). They share no signals; this top brings each one's
// ports out under a prefix so the whole set can be synthesized or simulated
// as one unit. Placing them together is this design's choice; each circuit
// was published as a design of its own. Purely combinational: outputs
// follow inputs after the gate delays, with no clock and no reset.
module rev_comb_top (
  input  logic [3:0]  dec_in,
  output logic [15:0] dec_out,
  input  logic [15:0] enc_in,
  output logic [3:0]  enc_out,
  input  logic [2:0]  fa_in,     // {a, b, cin}
  output logic [1:0]  fa_sum,    // {carry, sum}
  input  logic [2:0]  fs_in,     // {a, b, bin}
  output logic [1:0]  fs_diff,   // {borrow, difference}
  input  logic        cmp_a,
  input  logic        cmp_b,
  output logic        cmp_lt,
  output logic        cmp_eq,
  output logic        cmp_gt,
  input  logic [3:0]  mux4_in,
  input  logic [1:0]  mux4_sel,
  output logic        mux4_y,
  input  logic [7:0]  mux8_in,
  input  logic [2:0]  mux8_sel,
  output logic        mux8_y
);
  rdec4x16         u_dec  (.in(dec_in), .out(dec_out));
  renc             u_enc  (.in(enc_in), .out(enc_out));
  rfull_adder      u_fa   (.in(fa_in), .sum(fa_sum));
  rfull_subtractor u_fs   (.in(fs_in), .diff(fs_diff));
  rcomparator      u_cmp  (.a(cmp_a), .b(cmp_b), .lt(cmp_lt), .eq(cmp_eq), .gt(cmp_gt));
  rmux4x1          u_mux4 (.in(mux4_in), .sel(mux4_sel), .y(mux4_y));
  rmux8x1          u_mux8 (.in(mux8_in), .sel(mux8_sel), .y(mux8_y));
endmodule
