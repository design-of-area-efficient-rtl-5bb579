// full_adder: one-bit full adder, the cell of the ripple carry adders and of
// the bit-addition row of the three-operand adder.
//   s  = a ^ b ^ c
//   co = a&b | b&c | c&a  (majority)
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ c;
    co = (a & b) | (b & c) | (c & a);
  end
endmodule
