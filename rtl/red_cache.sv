// red_cache: the reconfigurable data cache ("Red Cache").
//
// A write-through cache with LRU replacement built on a 64 KB base cache of
// 4 ways x 256 sets x 16-word blocks (24-bit word addresses, 32-bit words).
// It can run as direct-mapped, 2-way or 4-way set associative and with
// blocks of 16, 32 or 64 words, nine configurations in all, chosen by
// setAssociativeMode and setBlockSize:
//   * the set is always picked by address bits [11:4]; the associativity only
//     restricts which ways may hold the address (see red_way_select);
//   * a 32-word block occupies two consecutive sets of one way, a 64-word
//     block four; the full 12-bit tag is stored and compared in every set,
//     so every base block is self-describing and the configuration can be
//     changed between any two accesses without flushing.
// A processor write updates every way of the set that holds a valid copy
// (so duplicate copies, possible after a configuration change, never
// diverge) and is always written through to memory; a write miss does not
// allocate. A read miss refills the whole block of the configured size,
// word by word, into the victim way, then returns the requested word.
//
// Interface (Table-1 names of the design): the processor raises procRead or
// procWrite for one cycle while busy is low; the configuration inputs are
// sampled in that same cycle and hold for that access. busy is high from the
// next cycle until the access is complete. Read data comes with a one-cycle
// dataReadyForProc pulse: one cycle after the request on a hit; on a miss
// after the refill and one more cycle. Memory requests (memRead / memWrite
// with addrToMem and dataToMem) are held until memory answers with a
// one-cycle dataReadyFromMem; a new request may follow in the next cycle.
// Hits and Misses count every read and write access; resetHitMissCounters
// clears them.
//
// Follows the design: sizes, address fields, way selection, full-tag
// compare, write-through with no dirty bits, LRU by two-bit counters, the
// interface and counters. This design's own choices: the cycle timing and
// handshakes above, no write allocation, updating all copies on a write,
// the memory acknowledging writes with dataReadyFromMem, and a read taking
// precedence should procRead and procWrite both be raised.
module red_cache
  import rabed_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        procRead,
  input  logic        procWrite,
  input  addr_t       procAddr,
  input  data_t       dataFromProc,
  output logic        dataReadyForProc,
  output data_t       dataToProc,
  output logic        busy,
  // configuration
  input  logic [1:0]  setAssociativeMode,
  input  logic [1:0]  setBlockSize,
  // memory side
  output logic        memRead,
  output logic        memWrite,
  output addr_t       addrToMem,
  output data_t       dataToMem,
  input  logic        dataReadyFromMem,
  input  data_t       dataFromMem,
  // statistics
  output logic [CNT_W-1:0] Hits,
  output logic [CNT_W-1:0] Misses,
  input  logic        resetHitMissCounters
);

  typedef enum logic [2:0] {
    ST_IDLE,
    ST_LOOKUP,
    ST_MEM_WR,
    ST_FILL,
    ST_RESPOND
  } state_e;

  state_e        state_q;
  addr_t         req_addr_q;
  data_t         req_data_q;
  logic          req_write_q;
  assoc_e        assoc_q;
  bsize_e        bsize_q;
  way_t          victim_q;
  logic [FILL_W-1:0] fill_cnt_q;
  data_t         rd_data_q;

  // ---------------------------------------------------------------- lookup
  tag_t          req_tag;
  index_t        req_index;
  offset_t       req_offset;
  tag_t          way_tags  [NUM_WAYS];
  logic [NUM_WAYS-1:0] way_valid;
  age_t          way_ages  [NUM_WAYS];
  data_t         way_data  [NUM_WAYS];
  logic [NUM_WAYS-1:0] cand_mask, match_mask;
  logic          hit;
  way_t          hit_way, victim;

  assign req_tag    = addr_tag(req_addr_q);
  assign req_index  = addr_index(req_addr_q);
  assign req_offset = addr_offset(req_addr_q);

  red_way_select u_sel (
    .req_tag    (req_tag),
    .assoc      (assoc_q),
    .tags       (way_tags),
    .valid      (way_valid),
    .ages       (way_ages),
    .cand_mask  (cand_mask),
    .match_mask (match_mask),
    .hit        (hit),
    .hit_way    (hit_way),
    .victim     (victim)
  );

  // ---------------------------------------------------------------- refill
  // words in the configured block, block-aligned address, word position
  logic [FILL_W:0]   blk_words;
  logic [FILL_W-1:0] blk_mask;          // offset bits within the block
  addr_t             blk_base;
  index_t            fill_index;
  offset_t           fill_offset;
  logic              fill_last;
  logic              fill_ack;

  always_comb begin
    blk_words   = (FILL_W + 1)'(group_blocks(bsize_q) * BLOCK_WORDS);
    blk_mask    = FILL_W'(blk_words - 1'b1);
    blk_base    = req_addr_q & ~addr_t'(blk_mask);
    fill_index  = addr_index(blk_base | addr_t'(fill_cnt_q));
    fill_offset = fill_cnt_q[OFFSET_W-1:0];
    fill_last   = (fill_cnt_q == blk_mask);
    fill_ack    = (state_q == ST_FILL) && dataReadyFromMem;
  end

  // ---------------------------------------------------------------- storage
  logic [NUM_WAYS-1:0] data_we;
  index_t              data_w_index;
  offset_t             data_w_offset;
  data_t               data_w_data;
  logic                tag_we;
  logic                lru_upd;
  way_t                lru_way;
  logic                cnt_hit, cnt_miss;

  always_comb begin
    data_we       = '0;
    data_w_index  = req_index;
    data_w_offset = req_offset;
    data_w_data   = req_data_q;
    if (state_q == ST_LOOKUP && req_write_q) begin
      data_we = match_mask;             // every valid copy of the block
    end else if (fill_ack) begin
      data_we[victim_q] = 1'b1;
      data_w_index  = fill_index;
      data_w_offset = fill_offset;
      data_w_data   = dataFromMem;
    end
    // a base block's tag and valid bit are set with its last word
    tag_we = fill_ack && (fill_offset == offset_t'(BLOCK_WORDS - 1));

    lru_upd  = 1'b0;
    lru_way  = hit_way;
    cnt_hit  = 1'b0;
    cnt_miss = 1'b0;
    if (state_q == ST_LOOKUP) begin
      cnt_hit  = hit;
      cnt_miss = !hit;
      lru_upd  = hit;
    end else if (state_q == ST_RESPOND) begin
      lru_upd  = 1'b1;
      lru_way  = victim_q;
    end
  end

  red_data_ram u_data (
    .clk      (clk),
    .we_mask  (data_we),
    .w_index  (data_w_index),
    .w_offset (data_w_offset),
    .w_data   (data_w_data),
    .r_index  (req_index),
    .r_offset (req_offset),
    .r_data   (way_data)
  );

  red_tag_ram u_tag (
    .clk     (clk),
    .we      (tag_we),
    .w_way   (victim_q),
    .w_index (fill_index),
    .w_tag   (req_tag),
    .r_index (req_index),
    .r_tag   (way_tags)
  );

  red_valid_bits u_valid (
    .clk     (clk),
    .rst_n   (rst_n),
    .we      (tag_we),
    .w_way   (victim_q),
    .w_index (fill_index),
    .w_valid (1'b1),
    .r_index (req_index),
    .r_valid (way_valid)
  );

  red_lru u_lru (
    .clk       (clk),
    .rst_n     (rst_n),
    .upd       (lru_upd),
    .upd_index (req_index),
    .upd_bsize (bsize_q),
    .upd_way   (lru_way),
    .r_index   (req_index),
    .r_age     (way_ages)
  );

  red_hit_miss_counters u_cnt (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (resetHitMissCounters),
    .inc_hit  (cnt_hit),
    .inc_miss (cnt_miss),
    .hits     (Hits),
    .misses   (Misses)
  );

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= ST_IDLE;
      req_addr_q  <= '0;
      req_data_q  <= '0;
      req_write_q <= 1'b0;
      assoc_q     <= ASSOC_DM;
      bsize_q     <= BS_16;
      victim_q    <= '0;
      fill_cnt_q  <= '0;
      rd_data_q   <= '0;
    end else begin
      case (state_q)
        ST_IDLE: begin
          if (procRead || procWrite) begin
            req_addr_q  <= procAddr;
            req_data_q  <= dataFromProc;
            req_write_q <= !procRead;
            assoc_q     <= norm_assoc(setAssociativeMode);
            bsize_q     <= norm_bsize(setBlockSize);
            state_q     <= ST_LOOKUP;
          end
        end
        ST_LOOKUP: begin
          if (req_write_q) begin
            state_q <= ST_MEM_WR;
          end else if (hit) begin
            state_q <= ST_IDLE;
          end else begin
            victim_q   <= victim;
            fill_cnt_q <= '0;
            state_q    <= ST_FILL;
          end
        end
        ST_MEM_WR: begin
          if (dataReadyFromMem) state_q <= ST_IDLE;
        end
        ST_FILL: begin
          if (dataReadyFromMem) begin
            if (fill_cnt_q == (req_addr_q[FILL_W-1:0] & blk_mask))
              rd_data_q <= dataFromMem;
            fill_cnt_q <= fill_cnt_q + 1'b1;
            if (fill_last) state_q <= ST_RESPOND;
          end
        end
        ST_RESPOND: state_q <= ST_IDLE;
        default:    state_q <= ST_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------------- outputs
  assign busy             = (state_q != ST_IDLE);
  assign dataReadyForProc = (state_q == ST_LOOKUP && !req_write_q && hit)
                         || (state_q == ST_RESPOND);
  assign dataToProc       = (state_q == ST_RESPOND) ? rd_data_q : way_data[hit_way];
  assign memRead          = (state_q == ST_FILL);
  assign memWrite         = (state_q == ST_MEM_WR);
  assign addrToMem        = (state_q == ST_FILL) ? (blk_base | addr_t'(fill_cnt_q)) : req_addr_q;
  assign dataToMem        = req_data_q;

  // ---------------------------------------------------------------- checks
  // a request is only raised while the cache is idle
  a_req_when_idle: assert property (@(posedge clk) disable iff (!rst_n)
    (procRead || procWrite) |-> !busy);
  a_one_op: assert property (@(posedge clk) disable iff (!rst_n)
    !(procRead && procWrite));
  // a hit is always in a way the configured associativity allows
  a_hit_in_cand: assert property (@(posedge clk) disable iff (!rst_n)
    (state_q == ST_LOOKUP && hit) |-> cand_mask[hit_way]);
  a_mem_excl: assert property (@(posedge clk) disable iff (!rst_n)
    !(memRead && memWrite));

endmodule
