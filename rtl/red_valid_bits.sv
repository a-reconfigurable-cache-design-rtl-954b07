// red_valid_bits: one valid bit per block of the reconfigurable cache.
//
// A flip-flop per (way, set), all cleared by reset so that the empty cache
// misses everywhere. One bit is written per cycle, synchronously, to the
// value given; the bits of all ways of one set are read combinationally.
// The valid bit per block follows the design; clearing on reset and the
// single write port are this design's choices.
module red_valid_bits
  import rabed_pkg::*;
#(
  parameter int unsigned WAYS = NUM_WAYS,
  parameter int unsigned SETS = NUM_SETS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      we,
  input  logic [$clog2(WAYS)-1:0]   w_way,
  input  logic [$clog2(SETS)-1:0]   w_index,
  input  logic                      w_valid,
  input  logic [$clog2(SETS)-1:0]   r_index,
  output logic [WAYS-1:0]           r_valid
);

  logic [WAYS-1:0] valid_q [SETS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) valid_q[s] <= '0;
    end else if (we) begin
      valid_q[w_index][w_way] <= w_valid;
    end
  end

  assign r_valid = valid_q[r_index];

endmodule
