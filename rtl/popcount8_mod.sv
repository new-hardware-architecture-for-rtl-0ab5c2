// popcount8_mod: the 8-input bit counter built from half adders, full adders
// and OR gates (30 gates: 9 half adders, 2 full adders, 2 OR gates).
//
// How it works. The word is split into two 4-bit groups, in_word[3:0] and
// in_word[7:4]. Each group is counted by a popcount4_mod (two layers of half
// adders and one OR gate), giving two 3-bit counts of 0..4. A merge layer of
// one half adder and two full adders (count_merge_adder, K = 3) adds them;
// its final carry is count[3]. The three layers and their gate counts follow
// the design.
//
// Interface: in_word[7:0] in; count[3:0] = number of ones (0..8) out. Purely
// combinational.
module popcount8_mod (
  input  logic [7:0] in_word,
  output logic [3:0] count
);

  logic [2:0] count_lo, count_hi;

  popcount4_mod u_grp_lo (.in_bits(in_word[3:0]), .count(count_lo));
  popcount4_mod u_grp_hi (.in_bits(in_word[7:4]), .count(count_hi));

  count_merge_adder #(.K(3)) u_merge (
    .a  (count_lo),
    .b  (count_hi),
    .sum(count)
  );

endmodule
