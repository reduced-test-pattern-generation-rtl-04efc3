// Shared constants and types of the hybrid test-data compressor.
//
// The default geometry is the worked example used throughout the design:
// a test set of three vectors, each cut into seven blocks of four bits.
// A test bit is carried as a (value, care) pair: care = 0 marks a don't care,
// whose value bit is ignored. Bit ordering everywhere: the leftmost printed
// bit of a vector is its MSB, and block 1 occupies the top BLOCK_W bits.
// The high-frequency threshold and the counter width are this design's own
// choices; the block geometry follows the worked example.
package hc_pkg;

  localparam int unsigned BLOCK_W     = 4;  // bits per block
  localparam int unsigned NUM_BLOCKS  = 7;  // blocks per test vector
  localparam int unsigned NUM_VECTORS = 3;  // vectors in the test set
  localparam int unsigned HF_THRESH   = 2;  // changes that make a column high frequency
  localparam int unsigned CNT_W       = 8;  // width of frequency / change counters

  // Controller states of the top level.
  typedef enum logic [2:0] {
    ST_LOAD,      // accept the raw test vectors
    ST_FILL,      // fill don't cares, match blocks, count column changes
    ST_BWT,       // issue a BWT on the next high-frequency column
    ST_BWT_WAIT,  // capture the BWT result
    ST_OVL,       // feed merged vectors to the pattern overlapper
    ST_FLUSH,     // drain the overlapper window
    ST_DONE
  } hc_state_e;

  // True when a fully specified block value m is contained in the block
  // (val, care), i.e. agrees with it on every specified bit.
  function automatic logic block_contains(input logic [BLOCK_W-1:0] m,
                                          input logic [BLOCK_W-1:0] val,
                                          input logic [BLOCK_W-1:0] care);
    return ((m ^ val) & care) == '0;
  endfunction

endpackage
