// rabed_pkg: shared types and constants of the reconfigurable data cache.
//
// The base cache is 64 KB: 4 ways x 256 sets x 16-word blocks of 32-bit
// words, addressed by a 24-bit word address split into tag [23:12],
// set index [11:4] and word offset [3:0]. Associativity is encoded on two
// bits (00 direct-mapped, 01 2-way, 10 4-way) and so is the block size
// (00 16 words, 01 32 words, 10 64 words). The field widths and the sizes
// follow the design description; the two-bit code values are this design's
// choice (the description only says each setting is a 2-bit value). The
// unused code 11 is treated as the largest setting (4-way, 64 words).
package rabed_pkg;

  localparam int ADDR_W      = 24;   // word address
  localparam int DATA_W      = 32;   // one word
  localparam int NUM_WAYS    = 4;
  localparam int NUM_SETS    = 256;
  localparam int BLOCK_WORDS = 16;   // base block
  localparam int WAY_W       = $clog2(NUM_WAYS);
  localparam int INDEX_W     = $clog2(NUM_SETS);
  localparam int OFFSET_W    = $clog2(BLOCK_WORDS);
  localparam int TAG_W       = ADDR_W - INDEX_W - OFFSET_W;   // 12
  localparam int LRU_W       = 2;    // two-bit age counter per block
  localparam int CNT_W       = 32;   // hit / miss counters
  localparam int MAX_GROUP   = 4;    // base blocks in the largest block
  localparam int FILL_W      = $clog2(MAX_GROUP * BLOCK_WORDS);  // 6

  typedef enum logic [1:0] {
    ASSOC_DM  = 2'b00,
    ASSOC_2W  = 2'b01,
    ASSOC_4W  = 2'b10,
    ASSOC_4WX = 2'b11
  } assoc_e;

  typedef enum logic [1:0] {
    BS_16  = 2'b00,
    BS_32  = 2'b01,
    BS_64  = 2'b10,
    BS_64X = 2'b11
  } bsize_e;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [DATA_W-1:0]  data_t;
  typedef logic [TAG_W-1:0]   tag_t;
  typedef logic [INDEX_W-1:0] index_t;
  typedef logic [OFFSET_W-1:0] offset_t;
  typedef logic [WAY_W-1:0]   way_t;
  typedef logic [LRU_W-1:0]   age_t;

  // Field extraction of a word address.
  function automatic tag_t addr_tag(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction

  function automatic index_t addr_index(addr_t a);
    return a[OFFSET_W +: INDEX_W];
  endfunction

  function automatic offset_t addr_offset(addr_t a);
    return a[OFFSET_W-1:0];
  endfunction

  // Number of base blocks that make up one block: 1, 2 or 4.
  function automatic int unsigned group_blocks(bsize_e bs);
    case (bs)
      BS_16:   return 1;
      BS_32:   return 2;
      default: return 4;
    endcase
  endfunction

  // Normalised associativity (code 11 behaves as 4-way).
  function automatic assoc_e norm_assoc(logic [1:0] a);
    return (a == 2'b11) ? ASSOC_4W : assoc_e'(a);
  endfunction

  function automatic bsize_e norm_bsize(logic [1:0] b);
    return (b == 2'b11) ? BS_64 : bsize_e'(b);
  endfunction

endpackage
