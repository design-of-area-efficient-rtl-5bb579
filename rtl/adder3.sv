// adder3: three-operand modulo-2^WIDTH adder, y = (a + b + c) mod 2^WIDTH.
//
// The addition is done in two stages. First a row of WIDTH full adders (the
// bit-addition logic) reduces the three operands to a partial sum
// s'_i = a_i ^ b_i ^ c_i and a carry cy_i = maj(a_i, b_i, c_i) per bit,
// with no carry travelling between bits. Then a square-root carry-select
// adder adds s' and the carries moved up one place (cy << 1), with carry-in
// 0. The carry out of bit WIDTH-1 of either stage is dropped, which is the
// reduction modulo 2^WIDTH. The bit-addition equations and the use of a
// square-root carry-select adder follow the reference design; joining them
// this way (a carry-save row in front of the two-operand adder) is this
// design's reading of how the three-operand addition is done. Combinational.
module adder3
  import prbg_pkg::*;
#(
  parameter int unsigned WIDTH = PRBG_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic [WIDTH-1:0] c,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] s_p;   // partial sum s'
  logic [WIDTH-1:0] cy;    // per-bit carry, weight 2^(i+1)
  logic             cout;  // carry out of the top bit, dropped (mod 2^WIDTH)

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit_add
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .c (c[i]),
      .s (s_p[i]),
      .co(cy[i])
    );
  end

  srcsa #(.WIDTH(WIDTH)) u_srcsa (
    .a   (s_p),
    .b   ({cy[WIDTH-2:0], 1'b0}),
    .cin (1'b0),
    .sum (y),
    .cout(cout)
  );
endmodule
