// tb_rg_feynman: exhaustive self-check of the Feynman (CNOT) gate.
//
// All four {A, B} patterns are applied and {P, Q} compared with the
// truth table written out as constants. A watchdog ends the run with a
// failure after 10 us.
module tb_rg_feynman;
  int checks = 0, failures = 0;
  logic a, b, p, q;
  localparam logic [1:0] TT [4] = '{2'b00, 2'b01, 2'b11, 2'b10};

  rg_feynman dut (.a(a), .b(b), .p(p), .q(q));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1ns;
      checks++;
      if ({p, q} !== TT[i]) begin
        failures++;
        $display("FAIL in=%02b got=%02b want=%02b", 2'(i), {p, q}, TT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
