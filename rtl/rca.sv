// rca: WIDTH-bit ripple carry adder, the building block of the square-root
// carry-select adder.
//
// A chain of WIDTH full adders; the carry of bit i feeds bit i+1, so the delay
// grows linearly with WIDTH. Ports: operands a and b, carry-in cin, sum and
// carry-out cout. Purely combinational. The reference architecture only
// names its ripple carry adders; the full-adder chain is the plain form.
module rca #(
  parameter int unsigned WIDTH = 2
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (c[i]),
      .s (sum[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
