// prbg_pkg: constants and elaboration-time helpers shared by the PRBG modules.
//
// PRBG_WIDTH is the word size of every LCG (32 bits, the size the design is
// built for). The srcsa_* functions describe how a square-root carry-select
// adder of a given width is cut into blocks: block 0 (least significant) and
// block 1 are 2 bits wide and every further block is one bit wider than the
// one below it (2-2-3-4-5 for 16 bits). When the running total would pass the
// adder width, the last block is cut short to the bits that remain (so a
// 32-bit adder is cut 2-2-3-4-5-6-7-3). The 16-bit cut is the one of the
// reference design; the rule used for other widths is this design's own.
package prbg_pkg;

  localparam int unsigned PRBG_WIDTH = 32;

  // Nominal size of block k before any truncation at the top.
  function automatic int unsigned srcsa_nominal(input int unsigned k);
    return (k == 0) ? 2 : k + 1;
  endfunction

  // Bit position of the least significant bit of block k.
  function automatic int unsigned srcsa_lsb(input int unsigned width, input int unsigned k);
    int unsigned pos;
    pos = 0;
    for (int unsigned j = 0; j < k; j++) pos += srcsa_nominal(j);
    return (pos > width) ? width : pos;
  endfunction

  // Width of block k, truncated so that the blocks end at bit width-1.
  function automatic int unsigned srcsa_size(input int unsigned width, input int unsigned k);
    int unsigned lo;
    lo = srcsa_lsb(width, k);
    return (lo + srcsa_nominal(k) > width) ? width - lo : srcsa_nominal(k);
  endfunction

  // Number of blocks needed to cover width bits.
  function automatic int unsigned srcsa_blocks(input int unsigned width);
    int unsigned n;
    n = 0;
    while (srcsa_lsb(width, n) < width) n++;
    return n;
  endfunction

endpackage
