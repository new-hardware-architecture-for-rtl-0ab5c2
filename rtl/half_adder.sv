// half_adder: one-bit half adder, the basic cell of the bit-counting tree.
//
// It adds two bits and gives a sum bit (one XOR gate) and a carry bit (one AND
// gate), two gates in all, as in the gate counts the design is judged by. The
// carry and the sum are never both 1, a fact the 4-input counter relies on.
//
// Interface: a, b in; s = a ^ b, c = a & b out. Purely combinational, one
// gate delay from either input to either output.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);

  always_comb begin
    s = a ^ b;
    c = a & b;
  end

endmodule
