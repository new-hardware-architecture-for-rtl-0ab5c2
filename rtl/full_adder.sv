// full_adder: one-bit full adder of five gates, used in the merge layers of
// the bit-counting tree.
//
// Only the gate count is fixed by the design (five gates, three of them on the
// carry path); the gate choice here is the usual one: two XOR gates form the
// sum, two AND gates and one OR gate form the carry.
//   p    = a ^ b
//   s    = p ^ cin
//   cout = (a & b) | (p & cin)
// Interface: a, b, cin in; s, cout out. Purely combinational: two gate delays
// to s, at most three to cout.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);

  logic p;

  always_comb begin
    p    = a ^ b;
    s    = p ^ cin;
    cout = (a & b) | (p & cin);
  end

endmodule
