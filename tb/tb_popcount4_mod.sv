// tb_popcount4_mod: exhaustive self-check of the 4-input group counter.
//
// All 16 inputs are applied and the count is compared with a bit-by-bit sum
// computed in the testbench. It also counts how often each weight-2 source of
// the OR gate is active (both pair sums 1, or exactly one pair carry 1) and
// how often the weight-4 output is used, and fails if any never happened.
module tb_popcount4_mod;

  logic [3:0] in_bits;
  logic [2:0] count;
  int checks = 0, failures = 0;
  int n_or_from_sums = 0, n_or_from_carries = 0, n_four = 0;

  popcount4_mod dut (.in_bits(in_bits), .count(count));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned want, pair_a, pair_b;
    for (int v = 0; v < 16; v++) begin
      in_bits = 4'(v);
      #1;
      want = 0;
      for (int k = 0; k < 4; k++) want += int'(in_bits[k]);
      pair_a = int'(in_bits[0]) + int'(in_bits[1]);
      pair_b = int'(in_bits[2]) + int'(in_bits[3]);
      if (pair_a == 1 && pair_b == 1) n_or_from_sums++;
      if ((pair_a == 2) != (pair_b == 2)) n_or_from_carries++;
      if (want == 4) n_four++;
      checks++;
      if (count != 3'(want)) begin
        failures++;
        $display("FAIL in=%b: got %0d, want %0d", in_bits, count, want);
      end
    end
    $display("OR from pair sums %0d, OR from pair carries %0d, count 4 %0d",
             n_or_from_sums, n_or_from_carries, n_four);
    checks++;
    if (n_or_from_sums == 0 || n_or_from_carries == 0 || n_four == 0) begin
      failures++;
      $display("FAIL: a counted case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
