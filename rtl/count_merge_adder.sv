// count_merge_adder: adds two K-bit counts into one (K+1)-bit count, the merge
// layer that joins two sub-counters of the bit-counting tree.
//
// It is a ripple-carry adder with a half adder in the lowest column (nothing
// carries into it) and K-1 full adders above it; the carry out of the top full
// adder becomes the new most significant bit. With K = 3 it is the top layer
// of the 8-input counter (one half adder, two full adders); with K = 4 it is
// the layer that joins two 8-input counters into a 16-input counter (one half
// adder, three full adders); each further doubling of the word adds one full
// adder. Ripple carry and a half adder in bit 0 follow the design.
//
// Parameter: K, width of each input count (default 4, the 16-bit merge).
// Interface: a[K-1:0], b[K-1:0] in; sum[K:0] = a + b out. Purely
// combinational; the carry ripples through all K cells.
module count_merge_adder #(
  parameter int unsigned K = 4
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K:0]   sum
);

  // carry[i] is the carry out of column i.
  logic [K-1:0] carry;

  half_adder u_col0 (.a(a[0]), .b(b[0]), .s(sum[0]), .c(carry[0]));

  for (genvar i = 1; i < int'(K); i++) begin : g_col
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i-1]),
      .s   (sum[i]),
      .cout(carry[i])
    );
  end

  assign sum[K] = carry[K-1];

endmodule
