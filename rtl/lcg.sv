// lcg: linear congruential generator q(i+1) = (a*q(i) + b) mod 2^WIDTH with
// the multiplier fixed to a = 2^R + 1.
//
// With that multiplier a*q = (q << R) + q, so one step is a three-operand
// addition (q << R) + q + b, done by adder3 (bit-addition row plus
// square-root carry-select adder); the shift is only wiring. A multiplexer in
// front of the adder chooses its operand q(i): the seed while start is 1,
// otherwise the register's own output. The register then takes the adder's
// result on every rising clock edge.
//
// Timing: in the clock cycle in which start is 1 the register loads
// a*seed + b, so q shows the first new number one cycle after start and a new
// number every cycle after that. rst_n (asynchronous, active low) clears the
// register to 0.
//
// The structure (start multiplexer, shift, three-operand adder, register)
// follows the reference design. Reset, the start polarity and taking a as the
// parameter R rather than a port are this design's choices.
module lcg
  import prbg_pkg::*;
#(
  parameter int unsigned WIDTH = PRBG_WIDTH,
  parameter int unsigned R     = 2           // multiplier a = 2^R + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,  // 1: use seed as q(i) this cycle
  input  logic [WIDTH-1:0] seed,   // initial value q0
  input  logic [WIDTH-1:0] b,      // increment
  output logic [WIDTH-1:0] q       // register output, q(i+1)
);
  logic [WIDTH-1:0] q_i;     // multiplexer output, the current state
  logic [WIDTH-1:0] q_next;  // a*q_i + b mod 2^WIDTH

  assign q_i = start ? seed : q;

  adder3 #(.WIDTH(WIDTH)) u_adder3 (
    .a(q_i << R),
    .b(q_i),
    .c(b),
    .y(q_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= q_next;
  end
endmodule
