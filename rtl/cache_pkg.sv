// cache_pkg: constants and types shared by the partitioned cache.
//
// The address layout follows a 48-bit byte address split into tag, index and
// a 5-bit offset (32-byte lines), with 8 ways per set. The index width is a
// module parameter (INDEX_WIDTH) so the cache size can be varied from 8 KiB
// (INDEX_WIDTH 5) to 8 MiB (INDEX_WIDTH 15) at 8 ways; the default of 8 gives
// a 64 KiB cache. The processor word size (64 bits) and the number of classes
// of service (2) are this design's choices.
package cache_pkg;

  localparam int ADDR_WIDTH   = 48;
  localparam int LINE_BYTES   = 32;
  localparam int OFFSET_WIDTH = $clog2(LINE_BYTES);
  localparam int LINE_BITS    = LINE_BYTES * 8;
  localparam int WORD_BITS    = 64;
  localparam int WORDS_PER_LINE = LINE_BITS / WORD_BITS;
  localparam int WORD_SEL_BITS  = $clog2(WORDS_PER_LINE);

  // Replacement algorithm, chosen when the cache is built.
  typedef enum logic [2:0] {
    REPL_RANDOM              = 3'd0,
    REPL_TRUE_LRU            = 3'd1,
    REPL_NRU                 = 3'd2,
    REPL_BINARY_TREE         = 3'd3,
    REPL_BINARY_TREE_PRIVATE = 3'd4,
    REPL_DRRIP               = 3'd5
  } repl_e;

endpackage
