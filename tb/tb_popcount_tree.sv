// tb_popcount_tree: end-to-end self-check of the bit counter at its default
// size (16 bits, two 8-input counters joined by one merge layer).
//
// All 65536 words are applied and the 5-bit count is compared with a
// bit-by-bit sum computed in the testbench. Alongside, it counts from the
// stimulus how often each mechanism of the circuit was exercised, and fails if
// one never was:
//   - the OR gate of a 4-bit group driven by the carry of the pair-sum adder
//     (both pairs hold exactly one 1),
//   - the OR gate driven by the sum of the pair-carry adder (exactly one pair
//     holds two 1s),
//   - a 4-bit group count of 4 (carry of the pair-carry adder),
//   - an 8-bit count of 8 (final carry of an 8-input counter's merge layer),
//   - a 16-bit count of 16 (final carry of the top merge layer),
// and every count value 0..16. The counter is combinational; each word is
// checked 1 time unit after it is applied.
module tb_popcount_tree;

  localparam int unsigned W  = 16;
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  in_word;
  logic [CW-1:0] count;
  int checks = 0, failures = 0;
  int n_or_sums = 0, n_or_carries = 0, n_group4 = 0, n_byte8 = 0, n_top = 0;
  int seen [0:W];

  popcount_tree dut (.in_word(in_word), .count(count));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ones in bits [lo +: n] of the current word.
  function automatic int unsigned ones(input logic [W-1:0] w, input int lo, input int n);
    int unsigned t = 0;
    for (int k = lo; k < lo + n; k++) t += int'(w[k]);
    return t;
  endfunction

  initial begin
    int unsigned want;
    foreach (seen[k]) seen[k] = 0;
    for (int v = 0; v < (1 << W); v++) begin
      in_word = W'(v);
      #1;
      want = ones(in_word, 0, W);
      seen[want]++;
      for (int g = 0; g < W; g += 4) begin
        if (ones(in_word, g, 2) == 1 && ones(in_word, g + 2, 2) == 1) n_or_sums++;
        if ((ones(in_word, g, 2) == 2) != (ones(in_word, g + 2, 2) == 2)) n_or_carries++;
        if (ones(in_word, g, 4) == 4) n_group4++;
      end
      for (int h = 0; h < W; h += 8)
        if (ones(in_word, h, 8) == 8) n_byte8++;
      if (want == W) n_top++;
      checks++;
      if (count != CW'(want)) begin
        failures++;
        if (failures < 10) $display("FAIL in=%h: got %0d, want %0d", in_word, count, want);
      end
    end
    $display("mechanisms: OR<-pair sums %0d, OR<-pair carries %0d, group=4 %0d, byte=8 %0d, word=16 %0d",
             n_or_sums, n_or_carries, n_group4, n_byte8, n_top);
    checks++;
    if (n_or_sums == 0 || n_or_carries == 0 || n_group4 == 0 || n_byte8 == 0 || n_top == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
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
