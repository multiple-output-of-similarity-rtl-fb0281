// am_pkg: sizes shared by the associative-memory blocks.
//
// The memory holds WORDS reference words of BITS bits each (32 x 8). It is
// written through a 5-bit address, and Hamming distances run from 0 to
// BITS. MAX_DIST is the largest distance that the similarity search still
// resolves. The floating-gate swing only covers distances up to 4, because
// the inverter threshold sits at half the supply. A word further than
// MAX_DIST from the input never fires.
package am_pkg;
  parameter int unsigned WORDS    = 32;
  parameter int unsigned BITS     = 8;
  parameter int unsigned ADDR_W   = $clog2(WORDS);
  parameter int unsigned DIST_W   = $clog2(BITS + 1);
  parameter int unsigned MAX_DIST = 4;

  typedef logic [BITS-1:0]   word_t;
  typedef logic [DIST_W-1:0] dist_t;
endpackage
