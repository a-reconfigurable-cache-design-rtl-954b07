// red_way_select: address mapping, tag comparators and way choice.
//
// Combinational. From the request's tag and the tags, valid bits and LRU
// ages of the four ways of the indexed set it gives:
//   cand_mask  the ways the configured associativity allows for this address:
//              direct-mapped  tag bits [1:0] (address bits 13:12) pick one way,
//              2-way          tag bit 0 (address bit 12) picks ways {0,2} or {1,3},
//              4-way          all four ways;
//   match_mask the ways holding a valid copy with the full tag (any way);
//   hit / hit_way  the lowest candidate way that matches;
//   victim     the way to refill on a miss: the lowest invalid candidate,
//              otherwise the candidate with the largest LRU age.
// With this mapping an address that hits in direct-mapped mode still hits
// in 2-way and 4-way mode, and one that hits in 2-way still hits in 4-way.
//
// The bits used for way selection and the full-tag compare follow the
// design's address-mapping table; the {0,2}/{1,3} pairing for 2-way mode is
// the pairing that keeps that hit-preservation property. Preferring invalid
// ways to the LRU victim is this design's choice.
module red_way_select
  import rabed_pkg::*;
(
  input  tag_t            req_tag,
  input  assoc_e          assoc,
  input  tag_t            tags  [NUM_WAYS],
  input  logic [NUM_WAYS-1:0] valid,
  input  age_t            ages  [NUM_WAYS],
  output logic [NUM_WAYS-1:0] cand_mask,
  output logic [NUM_WAYS-1:0] match_mask,
  output logic            hit,
  output way_t            hit_way,
  output way_t            victim
);

  logic [NUM_WAYS-1:0] cand_hit, cand_free;
  logic                found_free;
  age_t                oldest;

  always_comb begin
    // candidate ways per associativity
    cand_mask = '0;
    case (assoc)
      ASSOC_DM: cand_mask[req_tag[1:0]] = 1'b1;
      ASSOC_2W: for (int w = 0; w < NUM_WAYS; w++)
                  cand_mask[w] = (w[0] == req_tag[0]);
      default:  cand_mask = '1;
    endcase

    // comparators: full tag, every way
    for (int w = 0; w < NUM_WAYS; w++)
      match_mask[w] = valid[w] && (tags[w] == req_tag);

    cand_hit  = cand_mask & match_mask;
    cand_free = cand_mask & ~valid;
    hit       = |cand_hit;

    hit_way = '0;
    for (int w = NUM_WAYS - 1; w >= 0; w--)
      if (cand_hit[w]) hit_way = way_t'(w);

    // victim: lowest invalid candidate, else least recently used candidate
    found_free = 1'b0;
    victim     = '0;
    for (int w = NUM_WAYS - 1; w >= 0; w--)
      if (cand_free[w]) begin
        victim     = way_t'(w);
        found_free = 1'b1;
      end
    if (!found_free) begin
      oldest = '0;
      for (int w = 0; w < NUM_WAYS; w++)
        if (cand_mask[w] && ages[w] >= oldest) begin
          oldest = ages[w];
          victim = way_t'(w);
        end
    end
  end

endmodule
