// tb_half_adder: exhaustive self-check of the half adder.
//
// All four input pairs are applied; the expected sum and carry are the low and
// high bits of the integer sum a + b. A watchdog ends the run with a failure
// if it has not finished within a fixed time.
module tb_half_adder;

  logic a, b, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    for (int v = 0; v < 4; v++) begin
      {b, a} = 2'(v);
      #1;
      total = int'(a) + int'(b);
      checks++;
      if ({c, s} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b: got c=%0b s=%0b, want %0d", a, b, c, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
