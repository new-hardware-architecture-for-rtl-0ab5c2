// popcount4_mod: counts the set bits of a 4-bit group with four half adders
// and one OR gate (one half of the 8-input counter).
//
// How it works. Two half adders count the pairs (in_bits[1:0]) and
// (in_bits[3:2]); each pair count is 0, 1 or 2, so a pair's sum and carry are
// never both 1. A second layer of two half adders adds the two pair counts:
// one adds the two pair sums, the other adds the two pair carries. Where a
// general adder would need a full adder for the weight-2 column, an OR gate
// suffices: the carry out of the sum adder is 1 only when both pair sums are 1,
// and then both pair carries are 0, so the two weight-2 terms are never 1
// together and cannot produce a further carry.
//   count[0] = s_a ^ s_b
//   count[1] = (s_a & s_b) | (c_a ^ c_b)
//   count[2] = c_a & c_b
// The half-adder-plus-OR replacement of the full adder follows the design;
// which pair signals meet in which second-layer adder is this module's reading
// of it.
//
// Interface: in_bits[3:0] in; count[2:0] = number of ones (0..4) out. Purely
// combinational, three gate delays deep.
module popcount4_mod (
  input  logic [3:0] in_bits,
  output logic [2:0] count
);

  // Pair counts from the first layer.
  logic s_a, c_a, s_b, c_b;
  // Second layer: low column (sums) and high column (carries).
  logic s_lo, c_lo, s_hi, c_hi;

  half_adder u_pair_a (.a(in_bits[0]), .b(in_bits[1]), .s(s_a), .c(c_a));
  half_adder u_pair_b (.a(in_bits[2]), .b(in_bits[3]), .s(s_b), .c(c_b));

  half_adder u_add_lo (.a(s_a), .b(s_b), .s(s_lo), .c(c_lo));
  half_adder u_add_hi (.a(c_a), .b(c_b), .s(s_hi), .c(c_hi));

  always_comb begin
    count[0] = s_lo;
    count[1] = c_lo | s_hi;
    count[2] = c_hi;
  end

endmodule
