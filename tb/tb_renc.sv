// tb_renc: self-check of the reversible encoders (4x2, 8x3 and 16x4).
//
// Three instances, OUT_W = 2, 3 and the default 4. For every one-hot input
// in[i] the output must be i. Random inputs with several bits set must
// give the XOR of the set bits' indices, the documented behaviour for
// invalid inputs. The 16x4 instance's quantum cost must be 28. A watchdog
// ends the run with a failure after 100 us.
module tb_renc;
  int checks = 0, failures = 0;
  logic [3:0]  in2;  logic [1:0] out2;
  logic [7:0]  in3;  logic [2:0] out3;
  logic [15:0] in4;  logic [3:0] out4;

  renc #(.OUT_W(2)) dut2 (.in(in2), .out(out2));
  renc #(.OUT_W(3)) dut3 (.in(in3), .out(out3));
  renc              dut4 (.in(in4), .out(out4));

  function automatic logic [3:0] xor_index(logic [15:0] v);
    logic [3:0] acc = '0;
    for (int i = 0; i < 16; i++) if (v[i]) acc ^= 4'(i);
    return acc;
  endfunction

  task automatic check(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s got=%0d want=%0d", what, got, want);
    end
  endtask

  initial begin : watchdog
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check("quantum cost", dut4.QUANTUM_COST, 28);
    for (int i = 0; i < 16; i++) begin
      in2 = 4'(1 << (i % 4));
      in3 = 8'(1 << (i % 8));
      in4 = 16'(1 << i);
      #1ns;
      check("4x2", int'(out2), i % 4);
      check("8x3", int'(out3), i % 8);
      check("16x4", int'(out4), i);
    end
    for (int n = 0; n < 200; n++) begin
      in4 = 16'($urandom);
      #1ns;
      check("16x4 multi-hot", int'(out4), int'(xor_index(in4)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
