// tb_count_merge_adder: exhaustive self-check of the merge layer at its
// default width (K = 4, the layer that joins two 8-input counters) and at
// K = 3 (the top layer of the 8-input counter).
//
// Every pair of operands is applied and the sum is compared with the integer
// sum. The run also counts how often the carry into the new top bit is set,
// and fails if it never is.
module tb_count_merge_adder;

  logic [3:0] a4, b4;
  logic [4:0] sum4;
  logic [2:0] a3, b3;
  logic [3:0] sum3;
  int checks = 0, failures = 0;
  int n_top_carry = 0;

  count_merge_adder dut4 (.a(a4), .b(b4), .sum(sum4));
  count_merge_adder #(.K(3)) dut3 (.a(a3), .b(b3), .sum(sum3));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        a4 = 4'(x);
        b4 = 4'(y);
        a3 = 3'(x);
        b3 = 3'(y);
        #1;
        checks++;
        if (int'(sum4) != x + y) begin
          failures++;
          $display("FAIL K=4 %0d + %0d: got %0d", x, y, sum4);
        end
        if (x < 8 && y < 8) begin
          checks++;
          if (int'(sum3) != x + y) begin
            failures++;
            $display("FAIL K=3 %0d + %0d: got %0d", x, y, sum3);
          end
        end
        if (x + y >= 16) n_top_carry++;
      end
    end
    $display("top-bit carries: %0d", n_top_carry);
    checks++;
    if (n_top_carry == 0) begin
      failures++;
      $display("FAIL: carry into the top bit never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
