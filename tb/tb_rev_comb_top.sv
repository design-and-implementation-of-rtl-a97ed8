// tb_rev_comb_top: end-to-end self-check of all reversible circuits.
//
// Drives every circuit of rev_comb_top at once with random inputs for
// 2000 steps (the encoder always with a one-hot word) and compares each
// output with a behavioural reference: binary decode, index of the hot
// bit, a + b + cin, a - b - bin, magnitude compare and in[sel]. It also
// counts how often each case occurred: every decoder line and encoder
// index, carry and borrow both 0 and 1, each comparator outcome and every
// multiplexer select value. A case that never occurred is a failure.
// Runs with the top's default parameters. A watchdog ends the run with a
// failure after 1 ms.
module tb_rev_comb_top;
  int checks = 0, failures = 0;

  logic [3:0]  dec_in;   logic [15:0] dec_out;
  logic [15:0] enc_in;   logic [3:0]  enc_out;
  logic [2:0]  fa_in;    logic [1:0]  fa_sum;
  logic [2:0]  fs_in;    logic [1:0]  fs_diff;
  logic        cmp_a, cmp_b, cmp_lt, cmp_eq, cmp_gt;
  logic [3:0]  mux4_in;  logic [1:0]  mux4_sel; logic mux4_y;
  logic [7:0]  mux8_in;  logic [2:0]  mux8_sel; logic mux8_y;

  int dec_hits [16], enc_hits [16], carry_hits [2], borrow_hits [2];
  int cmp_hits [3], mux4_hits [4], mux8_hits [8];

  rev_comb_top dut (.*);

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s got=%0d want=%0d", what, got, want);
    end
  endtask

  task automatic covered(string what, int hits []);
    foreach (hits[k]) begin
      checks++;
      if (hits[k] == 0) begin
        failures++;
        $display("FAIL %s case %0d never occurred", what, k);
      end
    end
  endtask

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int idx, diff;
    for (int n = 0; n < 2000; n++) begin
      dec_in   = 4'($urandom);
      idx      = int'($urandom_range(15));
      enc_in   = 16'(1 << idx);
      fa_in    = 3'($urandom);
      fs_in    = 3'($urandom);
      {cmp_a, cmp_b} = 2'($urandom);
      mux4_in  = 4'($urandom);  mux4_sel = 2'($urandom);
      mux8_in  = 8'($urandom);  mux8_sel = 3'($urandom);
      #1ns;

      check("decoder", int'(dec_out), 1 << dec_in);
      check("encoder", int'(enc_out), idx);
      check("adder", int'(fa_sum), int'(fa_in[2]) + int'(fa_in[1]) + int'(fa_in[0]));
      diff = int'(fs_in[2]) - int'(fs_in[1]) - int'(fs_in[0]);
      check("subtractor", int'(fs_diff[0]) - 2 * int'(fs_diff[1]), diff);
      check("comparator", int'({cmp_lt, cmp_eq, cmp_gt}),
            int'({cmp_a < cmp_b, cmp_a == cmp_b, cmp_a > cmp_b}));
      check("mux4", int'(mux4_y), int'(mux4_in[mux4_sel]));
      check("mux8", int'(mux8_y), int'(mux8_in[mux8_sel]));

      dec_hits[dec_in]++;
      enc_hits[idx]++;
      carry_hits[fa_sum[1]]++;
      borrow_hits[fs_diff[1]]++;
      cmp_hits[cmp_lt ? 0 : cmp_eq ? 1 : 2]++;
      mux4_hits[mux4_sel]++;
      mux8_hits[mux8_sel]++;
    end

    covered("decoder line", dec_hits);
    covered("encoder index", enc_hits);
    covered("carry", carry_hits);
    covered("borrow", borrow_hits);
    covered("comparator lt/eq/gt", cmp_hits);
    covered("mux4 select", mux4_hits);
    covered("mux8 select", mux8_hits);
    $display("coverage: carry %0d/%0d borrow %0d/%0d lt %0d eq %0d gt %0d",
             carry_hits[0], carry_hits[1], borrow_hits[0], borrow_hits[1],
             cmp_hits[0], cmp_hits[1], cmp_hits[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
