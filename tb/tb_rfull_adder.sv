// tb_rfull_adder: exhaustive self-check of the reversible full adder.
//
// All eight {a, b, cin} combinations; {carry, sum} must equal the
// arithmetic sum a + b + cin. The quantum cost must be 61. A watchdog ends
// the run with a failure after 10 us.
module tb_rfull_adder;
  int checks = 0, failures = 0;
  logic [2:0] in;
  logic [1:0] sum;

  rfull_adder dut (.in(in), .sum(sum));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.QUANTUM_COST != 61) begin
      failures++;
      $display("FAIL quantum cost %0d", dut.QUANTUM_COST);
    end
    for (int i = 0; i < 8; i++) begin
      in = 3'(i);
      #1ns;
      checks++;
      if (int'(sum) != int'(in[2]) + int'(in[1]) + int'(in[0])) begin
        failures++;
        $display("FAIL in=%03b sum=%02b", in, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
