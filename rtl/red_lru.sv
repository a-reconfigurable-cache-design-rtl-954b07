// red_lru: LRU replacement state of the cache, kept by the counter method.
//
// Every block has a two-bit age counter; within a set the four ages are
// always a permutation of 0..3, 0 being the most recently used way and 3
// the least recently used. When way w of a set is used, every way of that
// set younger than w ages by one and w becomes 0 (the counter method).
// Reset gives way k the age k in every set.
//
// A block of 32 or 64 words occupies 2 or 4 consecutive sets of one way, so
// an update names the set, the block size and the way, and is applied to
// every set of the aligned group in the same clock edge. The ages of one
// set are read combinationally. The two-bit counter per block and the
// counter method follow the design; updating the whole group together is
// this design's choice, which keeps the sets of a large block in step.
module red_lru
  import rabed_pkg::*;
#(
  parameter int unsigned SETS = NUM_SETS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      upd,
  input  logic [$clog2(SETS)-1:0]   upd_index,
  input  bsize_e                    upd_bsize,
  input  way_t                      upd_way,
  input  logic [$clog2(SETS)-1:0]   r_index,
  output age_t                      r_age [NUM_WAYS]
);

  localparam int IW = $clog2(SETS);

  age_t age_q [SETS][NUM_WAYS];

  logic [IW-1:0] base;
  int unsigned   nblk;

  always_comb begin
    nblk = group_blocks(upd_bsize);
    base = upd_index & ~IW'(nblk - 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < NUM_WAYS; w++)
          age_q[s][w] <= age_t'(w);
    end else if (upd) begin
      for (int j = 0; j < MAX_GROUP; j++) begin
        if (j < nblk) begin
          for (int v = 0; v < NUM_WAYS; v++) begin
            if (way_t'(v) == upd_way)
              age_q[base + IW'(j)][v] <= '0;
            else if (age_q[base + IW'(j)][v] < age_q[base + IW'(j)][upd_way])
              age_q[base + IW'(j)][v] <= age_q[base + IW'(j)][v] + 1'b1;
          end
        end
      end
    end
  end

  assign r_age = age_q[r_index];

endmodule
