// tb_rg_or: exhaustive self-check of the Fredkin-based OR gate.
//
// All four {a, b} patterns are applied and y compared with the expected
// OR (a truth table written as constants), and the quantum cost
// with that of one Fredkin gate (5). A watchdog ends the run with a
// failure after 10 us.
module tb_rg_or;
  int checks = 0, failures = 0;
  logic a, b, y;
  localparam logic TT [4] = '{1'b0, 1'b1, 1'b1, 1'b1};

  rg_or dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.QUANTUM_COST != 5) begin
      failures++;
      $display("FAIL quantum cost %0d", dut.QUANTUM_COST);
    end
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1ns;
      checks++;
      if (y !== TT[i]) begin
        failures++;
        $display("FAIL in=%02b got=%0b want=%0b", 2'(i), y, TT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
