// red_tag_ram: the Tag RAM of the reconfigurable cache.
//
// One tag per block, one array per way. The tag is stored at its widest,
// the 12 bits a 4-way cache needs, for every configuration: the full tag is
// always compared, so a block's tag stays correct when the associativity or
// block size changes. All ways are read combinationally at one set index;
// one tag is written per cycle (synchronously) into the way and set given.
// Tags are not reset: the valid bits say whether a tag means anything.
module red_tag_ram
  import rabed_pkg::*;
#(
  parameter int unsigned WAYS = NUM_WAYS,
  parameter int unsigned SETS = NUM_SETS,
  parameter int unsigned TW   = TAG_W
) (
  input  logic                            clk,
  input  logic                            we,
  input  logic [$clog2(WAYS)-1:0]         w_way,
  input  logic [$clog2(SETS)-1:0]         w_index,
  input  logic [TW-1:0]                   w_tag,
  input  logic [$clog2(SETS)-1:0]         r_index,
  output logic [TW-1:0]                   r_tag [WAYS]
);

  for (genvar w = 0; w < WAYS; w++) begin : g_way
    logic [TW-1:0] mem [SETS];

    always_ff @(posedge clk) begin
      if (we && (w_way == w)) mem[w_index] <= w_tag;
    end

    assign r_tag[w] = mem[r_index];
  end

endmodule
