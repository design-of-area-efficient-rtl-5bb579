// clcg: coupled linear congruential generator.
//
// Two LCGs (multipliers 2^R1+1 and 2^R2+1, increments b1 and b2, seeds x0 and
// y0) step together; a magnitude comparator turns each pair of new states
// into one bit, bit = (x(i+1) > y(i+1)). The bit appears one clock after
// start and a new one follows every clock. Reset and start act on both LCGs
// as described in lcg. The pairing of two LCGs with one comparator follows
// the reference design; the comparison direction is this design's choice.
module clcg
  import prbg_pkg::*;
#(
  parameter int unsigned WIDTH = PRBG_WIDTH,
  parameter int unsigned R1    = 2,
  parameter int unsigned R2    = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [WIDTH-1:0] x0,
  input  logic [WIDTH-1:0] y0,
  input  logic [WIDTH-1:0] b1,
  input  logic [WIDTH-1:0] b2,
  output logic [WIDTH-1:0] x,     // first LCG state x(i+1)
  output logic [WIDTH-1:0] y,     // second LCG state y(i+1)
  output logic             bit_o  // x(i+1) > y(i+1)
);
  lcg #(.WIDTH(WIDTH), .R(R1)) u_lcg_x (
    .clk, .rst_n, .start, .seed(x0), .b(b1), .q(x)
  );
  lcg #(.WIDTH(WIDTH), .R(R2)) u_lcg_y (
    .clk, .rst_n, .start, .seed(y0), .b(b2), .q(y)
  );
  mag_comp #(.WIDTH(WIDTH)) u_comp (
    .a(x), .b(y), .gt(bit_o)
  );
endmodule
