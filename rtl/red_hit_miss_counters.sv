// red_hit_miss_counters: the Hits and Misses counters of the cache.
//
// Two 32-bit counters, incremented by one-cycle pulses from the cache
// controller (at most one of them per cycle in practice, though both may
// count in the same cycle). resetHitMissCounters clears both at the next
// clock edge and wins over an increment in that cycle. They wrap at 2^32.
// Width and the external clear follow the design's interface; the clear
// taking priority is this design's choice.
module red_hit_miss_counters
  import rabed_pkg::*;
#(
  parameter int unsigned W = CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         inc_hit,
  input  logic         inc_miss,
  output logic [W-1:0] hits,
  output logic [W-1:0] misses
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hits   <= '0;
      misses <= '0;
    end else if (clear) begin
      hits   <= '0;
      misses <= '0;
    end else begin
      if (inc_hit)  hits   <= hits + 1'b1;
      if (inc_miss) misses <= misses + 1'b1;
    end
  end

endmodule
