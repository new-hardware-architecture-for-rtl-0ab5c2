// popcount_tree: bit counter (population count) for a WIDTH-bit word, built by
// repeated duplication of the 8-input counter. This is the top of the design.
//
// How it works. A WIDTH-bit word is split into two halves, each half counted
// by a counter of WIDTH/2 inputs, and one merge layer (count_merge_adder: a
// half adder in the lowest column, full adders above it) adds the two half
// counts; its final carry is the new top count bit. Unrolled, this is a binary
// tree: WIDTH/8 leaf counters of 8 inputs (popcount8_mod) at the bottom and
// log2(WIDTH/8) merge levels above them, each level one bit wider than the
// one below. For the default WIDTH = 16 the result is two 8-input counters
// joined by one half adder and three full adders, 77 gates; WIDTH = 32 adds
// one more level of a half adder and four full adders, and so on for 64 and
// 128 bits. WIDTH = 4 is a single 4-input group counter (popcount4_mod).
// The duplication scheme and the 16-bit default follow the design; accepting
// only powers of two from 4 up is this module's choice, since the scheme
// halves the word at every level.
//
// The tree is written as a heap-numbered array of node counts: node 1 is the
// root, nodes i have children 2i and 2i+1, and the leaves are nodes
// NLEAF..2*NLEAF-1 (leaf j counts in_word[8j+7:8j]). A node at depth d covers
// WIDTH >> d bits, so its count is count_width(WIDTH >> d) bits wide; the
// array entries are CW bits wide and the bits above a node's width are tied to
// zero and left unread.
//
// Parameter: WIDTH, word size in bits, a power of two, at least 4.
// Interface: in_word[WIDTH-1:0] in; count = number of ones in in_word
// (0..WIDTH), $clog2(WIDTH+1) bits, out. Purely combinational: no clock, no
// reset; the count is valid one combinational settling time after in_word.
module popcount_tree
  import popcount_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0]                 in_word,
  output logic [count_width(WIDTH)-1:0]    count
);

  localparam int unsigned CW    = count_width(WIDTH);
  localparam int unsigned NLEAF = (WIDTH >= 8) ? WIDTH / 8 : 1;

  if (!legal_width(WIDTH)) begin : g_bad_width
    $error("popcount_tree: WIDTH must be a power of two of at least 4");
  end else if (WIDTH == 4) begin : g_leaf4
    popcount4_mod u_leaf (.in_bits(in_word), .count(count));
  end else begin : g_tree
    // node_cnt[i]: count of node i, zero-extended to CW bits.
    logic [CW-1:0] node_cnt [1:2*NLEAF-1];

    for (genvar j = 0; j < int'(NLEAF); j++) begin : g_leaf
      logic [3:0] leaf_cnt;
      popcount8_mod u_pc8 (
        .in_word(in_word[8*j +: 8]),
        .count  (leaf_cnt)
      );
      assign node_cnt[NLEAF+j] = CW'(leaf_cnt);
    end

    for (genvar i = 1; i < int'(NLEAF); i++) begin : g_node
      // Depth of node i below the root, and width of each child count.
      localparam int unsigned DEPTH = $clog2(i + 1) - 1;
      localparam int unsigned K     = count_width(WIDTH >> (DEPTH + 1));
      logic [K:0] merged;

      count_merge_adder #(.K(K)) u_merge (
        .a  (node_cnt[2*i][K-1:0]),
        .b  (node_cnt[2*i+1][K-1:0]),
        .sum(merged)
      );
      assign node_cnt[i] = CW'(merged);
    end

    assign count = node_cnt[1];
  end

endmodule
