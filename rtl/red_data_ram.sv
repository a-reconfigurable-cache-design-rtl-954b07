// red_data_ram: the Data RAM of the reconfigurable cache.
//
// Holds the cached words: one array per way, each NUM_SETS x BLOCK_WORDS
// words (4 x 256 x 16 x 32 bit = 64 KB by default). All ways are read at
// the same (set, word) position combinationally, so the controller can
// pick the hitting way in the same cycle it compares the tags. Writes are
// synchronous, one word position per cycle, into any subset of the ways
// given by a mask: a processor write updates every way that holds a copy
// of the addressed block.
//
// The size and the way/set/word organisation follow the base cache of the
// design; asynchronous reads (a register-file style memory) and the
// multi-way write mask are this design's choices. The contents are not
// reset: a word is only read after its block has been filled.
module red_data_ram
  import rabed_pkg::*;
#(
  parameter int unsigned WAYS  = NUM_WAYS,
  parameter int unsigned SETS  = NUM_SETS,
  parameter int unsigned WORDS = BLOCK_WORDS
) (
  input  logic                      clk,
  // write port
  input  logic [WAYS-1:0]           we_mask,
  input  logic [$clog2(SETS)-1:0]   w_index,
  input  logic [$clog2(WORDS)-1:0]  w_offset,
  input  data_t                     w_data,
  // read port, all ways at once
  input  logic [$clog2(SETS)-1:0]   r_index,
  input  logic [$clog2(WORDS)-1:0]  r_offset,
  output data_t                     r_data [WAYS]
);

  localparam int unsigned DEPTH = SETS * WORDS;

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    data_t mem [DEPTH];

    always_ff @(posedge clk) begin
      if (we_mask[w]) mem[{w_index, w_offset}] <= w_data;
    end

    assign r_data[w] = mem[{r_index, r_offset}];
  end

endmodule
