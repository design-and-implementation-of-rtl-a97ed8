// tb_rmux8x1: exhaustive self-check of the reversible 8-to-1 multiplexer.
//
// Every select value with every data word: y must equal in[sel]. The
// quantum cost is compared with 106. A watchdog ends the run with a failure
// after 1 ms.
module tb_rmux8x1;
  int checks = 0, failures = 0;
  logic [7:0] in;
  logic [2:0] sel;
  logic y;

  rmux8x1 dut (.in(in), .sel(sel), .y(y));

  initial begin : watchdog
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++;
    if (dut.QUANTUM_COST != 106) begin
      failures++;
      $display("FAIL quantum cost %0d", dut.QUANTUM_COST);
    end
    for (int s = 0; s < 8; s++) begin
      for (int d = 0; d < (1 << 8); d++) begin
        sel = 3'(s);
        in  = 8'(d);
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
