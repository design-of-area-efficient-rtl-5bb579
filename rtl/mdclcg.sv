// mdclcg: modified dual-CLCG pseudorandom bit generator.
//
// Four 32-bit LCGs are grouped into two coupled pairs. The first pair (seeds
// x0, y0) gives B(i) = x(i+1) > y(i+1), the second (seeds p0, q0) gives
// C(i) = p(i+1) > q(i+1), and the output bit is z = B(i) ^ C(i). Each LCG
// computes a*s + b mod 2^32 with a = 2^R + 1 by a three-operand adder built on
// a square-root carry-select adder.
//
// Interface and timing: hold start at 1 for one or more clock cycles to load
// the seeds (the cycle in which start is 1 already computes the first step
// from the seeds). From the next cycle on, z carries one new pseudorandom bit
// per clock and valid is 1. Raising start again restarts the sequence from
// the seeds. rst_n (asynchronous, active low) clears all state and valid.
//
// The four-LCG, two-comparator, XOR structure and the 32-bit width follow
// the reference design. The multipliers (parameters R1..R4), reset, the valid
// flag and the comparison direction are this design's choices; the increments
// b1..b4 are ports and should be odd for a full-period sequence.
module mdclcg
  import prbg_pkg::*;
#(
  parameter int unsigned WIDTH = PRBG_WIDTH,
  parameter int unsigned R1    = 2,   // a1 = 5
  parameter int unsigned R2    = 3,   // a2 = 9
  parameter int unsigned R3    = 4,   // a3 = 17
  parameter int unsigned R4    = 5    // a4 = 33
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] x0,
  input  logic [WIDTH-1:0] y0,
  input  logic [WIDTH-1:0] p0,
  input  logic [WIDTH-1:0] q0,
  input  logic [WIDTH-1:0] b1,
  input  logic [WIDTH-1:0] b2,
  input  logic [WIDTH-1:0] b3,
  input  logic [WIDTH-1:0] b4,
  output logic             z,      // pseudorandom bit Z(i)
  output logic             valid   // z holds a generated bit
);
  logic [WIDTH-1:0] x, y, p, q;
  logic             b_bit, c_bit;

  clcg #(.WIDTH(WIDTH), .R1(R1), .R2(R2)) u_clcg1 (
    .clk, .rst_n, .start, .x0(x0), .y0(y0), .b1(b1), .b2(b2),
    .x(x), .y(y), .bit_o(b_bit)
  );
  clcg #(.WIDTH(WIDTH), .R1(R3), .R2(R4)) u_clcg2 (
    .clk, .rst_n, .start, .x0(p0), .y0(q0), .b1(b3), .b2(b4),
    .x(p), .y(q), .bit_o(c_bit)
  );

  assign z = b_bit ^ c_bit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid <= 1'b0;
    else if (start) valid <= 1'b1;
  end
endmodule
