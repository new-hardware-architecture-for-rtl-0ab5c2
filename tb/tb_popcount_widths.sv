// tb_popcount_widths: checks the bit counter at every word size the
// duplication scheme is extended to: 4, 8, 32, 64 and 128 bits (16 bits has
// its own exhaustive test).
//
// Each instance gets the same stimulus: all zeros, all ones, a walking one,
// a walking zero and 2000 random words built from $urandom. Each count is
// compared with a bit-by-bit sum computed in the testbench. The all-ones word
// drives the final carry of every merge level into the top count bit.
module tb_popcount_widths;

  logic [127:0] word;
  logic [2:0] c4;
  logic [3:0] c8;
  logic [5:0] c32;
  logic [6:0] c64;
  logic [7:0] c128;
  int checks = 0, failures = 0;

  popcount_tree #(.WIDTH(4))   u4   (.in_word(word[3:0]),  .count(c4));
  popcount_tree #(.WIDTH(8))   u8   (.in_word(word[7:0]),  .count(c8));
  popcount_tree #(.WIDTH(32))  u32  (.in_word(word[31:0]), .count(c32));
  popcount_tree #(.WIDTH(64))  u64  (.in_word(word[63:0]), .count(c64));
  popcount_tree #(.WIDTH(128)) u128 (.in_word(word),       .count(c128));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int unsigned ones(input logic [127:0] w, input int n);
    int unsigned t = 0;
    for (int k = 0; k < n; k++) t += int'(w[k]);
    return t;
  endfunction

  task automatic check_one(input string name, input int unsigned got, input int unsigned want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s word=%h: got %0d, want %0d", name, word, got, want);
    end
  endtask

  task automatic apply(input logic [127:0] w);
    word = w;
    #1;
    check_one("w4",   int'(c4),   ones(word, 4));
    check_one("w8",   int'(c8),   ones(word, 8));
    check_one("w32",  int'(c32),  ones(word, 32));
    check_one("w64",  int'(c64),  ones(word, 64));
    check_one("w128", int'(c128), ones(word, 128));
  endtask

  initial begin
    apply('0);
    apply('1);
    for (int k = 0; k < 128; k++) apply(128'(1) << k);
    for (int k = 0; k < 128; k++) apply(~(128'(1) << k));
    for (int n = 0; n < 2000; n++)
      apply({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
