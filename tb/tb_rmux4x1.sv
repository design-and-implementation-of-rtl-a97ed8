// tb_rmux4x1: exhaustive self-check of the reversible 4-to-1 multiplexer.
//
// Every select value with every data word: y must equal in[sel]. The
// quantum cost is compared with 46. A watchdog ends the run with a failure
// after 1 ms.
module tb_rmux4x1;
  int checks = 0, failures = 0;
  logic [3:0] in;
  logic [1:0] sel;
  logic y;

  rmux4x1 dut (.in(in), .sel(sel), .y(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.QUANTUM_COST != 46) begin
      failures++;
      $display("FAIL quantum cost %0d", dut.QUANTUM_COST);
    end
    for (int s = 0; s < 4; s++) begin
      for (int d = 0; d < (1 << 4); d++) begin
        sel = 2'(s);
        in  = 4'(d);
        #1ns;
        checks++;
        if (y !== ((d >> s) & 1)) begin
          failures++;
          $display("FAIL sel=%0d in=%b y=%0b", s, in, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
