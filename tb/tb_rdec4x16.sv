// tb_rdec4x16: exhaustive self-check of the reversible 4-to-16 decoder.
//
// Every input value i is applied; the output must be the one-hot word with
// only bit i set, and each output line must have been high exactly once.
// The elaborated quantum cost is compared with 71. A watchdog ends the run
// with a failure after 10 us.
module tb_rdec4x16;
  int checks = 0, failures = 0;
  logic [3:0] in;
  logic [15:0] out;
  int hits [16];

  rdec4x16 dut (.in(in), .out(out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.QUANTUM_COST != 71) begin
      failures++;
      $display("FAIL quantum cost %0d", dut.QUANTUM_COST);
    end
    foreach (hits[k]) hits[k] = 0;
    for (int i = 0; i < 16; i++) begin
      in = 4'(i);
      #1ns;
      checks++;
      if (out !== (16'(1) << i)) begin
        failures++;
        $display("FAIL in=%0d out=%b", i, out);
      end
      for (int k = 0; k < 16; k++) if (out[k]) hits[k]++;
    end
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (hits[k] != 1) begin
        failures++;
        $display("FAIL line %0d high %0d times", k, hits[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
