// mag_comp: unsigned magnitude comparator, gt = (a > b).
//
// Compares the outputs of the two LCGs of a coupled pair and gives the
// pair's output bit. The reference design uses a magnitude comparator here;
// the choice of "greater than" as the comparison is this design's own.
// Combinational.
module mag_comp
  import prbg_pkg::*;
#(
  parameter int unsigned WIDTH = PRBG_WIDTH
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic             gt
);
  assign gt = (a > b);
endmodule
