// tb_rg_not: exhaustive self-check of the reversible NOT gate.
//
// Both input values are applied and P compared with the truth table
// (0 -> 1, 1 -> 0). A watchdog ends the run with a failure after 10 us.
module tb_rg_not;
  int checks = 0, failures = 0;
  logic a, p;
  localparam logic TT [2] = '{1'b1, 1'b0};

  rg_not dut (.a(a), .p(p));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1ns;
      checks++;
      if (p !== TT[i]) begin
        failures++;
        $display("FAIL a=%0d p=%0d", i, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
