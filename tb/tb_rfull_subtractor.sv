// tb_rfull_subtractor: exhaustive self-check of the reversible full
// subtractor.
//
// All eight {a, b, bin} combinations; the two-bit result {borrow, diff}
// must satisfy a - b - bin = diff - 2 * borrow. A watchdog ends the run
// with a failure after 10 us.
module tb_rfull_subtractor;
  int checks = 0, failures = 0;
  logic [2:0] in;
  logic [1:0] diff;

  rfull_subtractor dut (.in(in), .diff(diff));

  initial begin : watchdog
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      in = 3'(i);
      #1ns;
      checks++;
      if (int'(in[2]) - int'(in[1]) - int'(in[0]) != int'(diff[0]) - 2 * int'(diff[1])) begin
        failures++;
        $display("FAIL in=%03b diff=%02b", in, diff);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
