// srcsa: square-root carry-select adder (sum = a + b + cin).
//
// The operands are cut into blocks whose size grows towards the most
// significant end (2-2-3-4-5 for the default 16 bits; see prbg_pkg for the
// rule at other widths). Block 0 is a plain ripple carry adder driven by cin.
// Every higher block holds two ripple carry adders on the same operand bits,
// one with carry-in 0 and one with carry-in 1, which work in parallel with
// the blocks below. A 2:1 multiplexer per block then picks the sum bits and
// carry-out of the carry-in-0 adder when the carry from the block below is 0
// and those of the carry-in-1 adder when it is 1. Because the larger blocks
// sit where the selecting carry arrives later, their ripple finishes at about
// the time the carry reaches them. The block structure, sizes and selection
// rule follow the reference design; the code is combinational, with no
// registers.
module srcsa
  import prbg_pkg::*;
#(
  parameter int unsigned WIDTH = 16
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned NBLK = srcsa_blocks(WIDTH);

  // carry[k] is the carry into block k; carry[NBLK] is the adder's carry-out.
  logic [NBLK:0] carry;

  assign carry[0] = cin;

  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    localparam int unsigned LO = srcsa_lsb(WIDTH, k);
    localparam int unsigned SZ = srcsa_size(WIDTH, k);

    if (k == 0) begin : g_first
      rca #(.WIDTH(SZ)) u_rca (
        .a   (a[LO +: SZ]),
        .b   (b[LO +: SZ]),
        .cin (carry[0]),
        .sum (sum[LO +: SZ]),
        .cout(carry[1])
      );
    end else begin : g_sel
      logic [SZ-1:0] sum0, sum1;
      logic          co0, co1;

      rca #(.WIDTH(SZ)) u_rca0 (
        .a   (a[LO +: SZ]),
        .b   (b[LO +: SZ]),
        .cin (1'b0),
        .sum (sum0),
        .cout(co0)
      );
      rca #(.WIDTH(SZ)) u_rca1 (
        .a   (a[LO +: SZ]),
        .b   (b[LO +: SZ]),
        .cin (1'b1),
        .sum (sum1),
        .cout(co1)
      );

      // Block multiplexer: (sum, carry) of the adder that assumed the right carry.
      assign {carry[k+1], sum[LO +: SZ]} = carry[k] ? {co1, sum1} : {co0, sum0};
    end
  end

  assign cout = carry[NBLK];
endmodule
