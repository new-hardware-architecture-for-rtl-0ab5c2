// tb_full_adder: exhaustive self-check of the five-gate full adder.
//
// All eight input combinations are applied; the expected {cout, s} is the
// integer sum a + b + cin. A watchdog ends the run with a failure if it has
// not finished within a fixed time.
module tb_full_adder;

  logic a, b, cin, s, cout;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned total;
    for (int v = 0; v < 8; v++) begin
      {cin, b, a} = 3'(v);
      #1;
      total = int'(a) + int'(b) + int'(cin);
      checks++;
      if ({cout, s} != 2'(total)) begin
        failures++;
        $display("FAIL a=%0b b=%0b cin=%0b: got cout=%0b s=%0b, want %0d",
                 a, b, cin, cout, s, total);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
