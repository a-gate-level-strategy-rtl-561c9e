// Shared types and constants of the carry select adder.
//
// A carry select adder is described by the list of its block sizes
// M_1 .. M_Q (bits computed by each block, first block first). The list is
// carried as a fixed-length array of MAX_BLOCKS entries; entries from index Q
// on are unused and conventionally zero. block_offset() gives the position of
// the least significant bit of a block, so that the adder width is
// block_offset(sizes, Q), i.e. the sum of the M_i.
//
// The default list, 2, 2, 3, 5, 8, 12 (32 bits), is the 32-bit sizing that
// the delay-driven sizing procedure yields for normalised MUX parameters
// alpha = 0.33, beta = 0.26, and that is also the optimum for several other
// (alpha, beta) pairs. MAX_BLOCKS = 16 is this design's own bound; the
// longest sizing considered for 32- and 64-bit adders has 13 blocks.
package csa_pkg;

  parameter int unsigned MAX_BLOCKS = 16;

  typedef int unsigned block_sizes_t [MAX_BLOCKS];

  parameter int unsigned DEFAULT_Q = 6;
  parameter block_sizes_t DEFAULT_SIZES =
    '{2, 2, 3, 5, 8, 12, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};

  // Bit position of the least significant bit of block number idx (0-based):
  // the sum of the sizes of blocks 0 .. idx-1.
  function automatic int unsigned block_offset(block_sizes_t sizes, int unsigned idx);
    int unsigned acc;
    acc = 0;
    for (int unsigned k = 0; k < MAX_BLOCKS; k++) begin
      if (k < idx) acc += sizes[k];
    end
    return acc;
  endfunction

endpackage
