// tb_rg_fredkin: exhaustive self-check of the Fredkin gate.
//
// Applies all eight {A, B, C} input patterns and compares {P, Q, R} with
// the gate's truth table, written out below as constants rather than as
// equations. A watchdog ends the run with a failure after 10 us.
module tb_rg_fredkin;
  int checks = 0, failures = 0;
  logic a, b, c, p, q, r;

  // Truth table, row {A,B,C} = index, value {P,Q,R}.
  localparam logic [2:0] TT [8] = '{3'b000, 3'b001, 3'b010, 3'b011, 3'b100, 3'b110, 3'b101, 3'b111};

  rg_fredkin dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1ns;
      checks++;
      if ({p, q, r} !== TT[i]) begin
        failures++;
        $display("FAIL in=%03b got=%03b want=%03b", 3'(i), {p, q, r}, TT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
