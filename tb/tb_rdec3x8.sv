// tb_rdec3x8: exhaustive self-check of the reversible 3-to-8 decoder.
//
// Every input value i is applied; the output must be the one-hot word with
// only bit i set, and each output line must have been high exactly once.
// The elaborated quantum cost is compared with 31. A watchdog ends the run
// with a failure after 10 us.
module tb_rdec3x8;
  int checks = 0, failures = 0;
  logic [2:0] in;
  logic [7:0] out;
  int hits [8];

  rdec3x8 dut (.in(in), .out(out));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.QUANTUM_COST != 31) begin
      failures++;
      $display("FAIL quantum cost %0d", dut.QUANTUM_COST);
    end
    foreach (hits[k]) hits[k] = 0;
    for (int i = 0; i < 8; i++) begin
      in = 3'(i);
      #1ns;
      checks++;
      if (out !== (8'(1) << i)) begin
        failures++;
        $display("FAIL in=%0d out=%b", i, out);
      end
      for (int k = 0; k < 8; k++) if (out[k]) hits[k]++;
    end
    for (int k = 0; k < 8; k++) begin
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
