// tb_popcount8_mod: exhaustive self-check of the 8-input counter.
//
// All 256 words are applied and the 4-bit count is compared with a
// bit-by-bit sum computed in the testbench. Every count value 0..8 must
// occur, including 8, where the final carry of the merge layer drives the
// top output bit.
module tb_popcount8_mod;

  logic [7:0] in_word;
  logic [3:0] count;
  int checks = 0, failures = 0;
  int seen [0:8];

  popcount8_mod dut (.in_word(in_word), .count(count));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned want;
    foreach (seen[k]) seen[k] = 0;
    for (int v = 0; v < 256; v++) begin
      in_word = 8'(v);
      #1;
      want = 0;
      for (int k = 0; k < 8; k++) want += int'(in_word[k]);
      seen[want]++;
      checks++;
      if (count != 4'(want)) begin
        failures++;
        $display("FAIL in=%b: got %0d, want %0d", in_word, count, want);
      end
    end
    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL: count %0d never occurred", k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
