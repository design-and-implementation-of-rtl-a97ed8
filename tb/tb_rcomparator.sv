// tb_rcomparator: exhaustive self-check of the reversible 1-bit comparator.
//
// All four {a, b} pairs; lt, eq and gt must match a < b, a == b and a > b.
// The quantum cost must be 16. A watchdog ends the run with a failure
// after 10 us.
module tb_rcomparator;
  int checks = 0, failures = 0;
  logic a, b, lt, eq, gt;

  rcomparator dut (.a(a), .b(b), .lt(lt), .eq(eq), .gt(gt));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.QUANTUM_COST != 16) begin
      failures++;
      $display("FAIL quantum cost %0d", dut.QUANTUM_COST);
    end
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1ns;
      checks++;
      if ({lt, eq, gt} !== {a < b, a == b, a > b}) begin
        failures++;
        $display("FAIL a=%0b b=%0b lt/eq/gt=%03b", a, b, {lt, eq, gt});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
