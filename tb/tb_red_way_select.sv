// tb_red_way_select: self-checking testbench of red_way_select.
// Random request tags against random tags (often equal to the request's),
// valid bits and LRU ages (a random permutation), in every associativity
// code. The expected candidate ways, matches, hit, hit way and victim are
// worked out here from the address-mapping rules. Also checks the
// property the mapping is built for: an address that hits direct-mapped
// also hits 2-way and 4-way, and one that hits 2-way also hits 4-way.
`timescale 1ns/1ps
module tb_red_way_select;
  import rabed_pkg::*;
  tag_t req_tag;
  assoc_e assoc;
  tag_t tags [4];
  logic [3:0] valid;
  age_t ages [4];
  logic [3:0] cand_mask, match_mask;
  logic hit;
  way_t hit_way, victim;
  int checks = 0, failures = 0;

  red_way_select dut (.*);

  task automatic check(bit c, string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 20000; i++) begin
      int perm [4] = '{0, 1, 2, 3};
      logic [3:0] ec, em;
      int ehw, ev, best;
      bit hits_at [3];
      perm.shuffle();
      req_tag = tag_t'($urandom);
      for (int w = 0; w < 4; w++) begin
        tags[w] = ($urandom % 2) ? req_tag : tag_t'($urandom % 8);
        ages[w] = age_t'(perm[w]);
      end
      valid = ($urandom % 2) ? 4'hF : 4'($urandom);
      for (int a = 0; a < 4; a++) begin
        assoc = assoc_e'(a);
        #1;
        for (int w = 0; w < 4; w++) begin
          ec[w] = (a == 0) ? (w == int'(req_tag % 4)) : (a == 1) ? (w % 2 == int'(req_tag % 2)) : 1'b1;
          em[w] = valid[w] && tags[w] == req_tag;
        end
        ehw = -1;
        for (int w = 0; w < 4; w++) if (ec[w] && em[w] && ehw < 0) ehw = w;
        ev = -1;
        for (int w = 0; w < 4; w++) if (ec[w] && !valid[w] && ev < 0) ev = w;
        if (ev < 0) begin
          best = -1;
          for (int w = 0; w < 4; w++) if (ec[w] && perm[w] > best) begin best = perm[w]; ev = w; end
        end
        check(cand_mask == ec, $sformatf("cand %b vs %b (assoc %0d)", cand_mask, ec, a));
        check(match_mask == em, "match mask");
        check(hit == (ehw >= 0), "hit");
        if (ehw >= 0) check(int'(hit_way) == ehw, "hit way");
        check(int'(victim) == ev, $sformatf("victim %0d vs %0d (assoc %0d)", victim, ev, a));
        if (a < 3) hits_at[a] = hit;
      end
      if (hits_at[0]) check(hits_at[1] && hits_at[2], "direct-mapped hit stays a hit");
      if (hits_at[1]) check(hits_at[2], "2-way hit stays a hit");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
