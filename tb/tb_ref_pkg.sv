// tb_ref_pkg: reference model of the reconfigurable cache's hit/miss
// behaviour, for testbenches only.
//
// ref_cache keeps a tag, a valid bit and an LRU age per (way, set) and
// applies the rules of the design to each access: the set is address bits
// [11:4]; direct-mapped mode may only use the way named by address bits
// 13:12, 2-way mode the ways whose low bit equals address bit 12, 4-way
// mode any way; a hit needs a valid block with the full 12-bit tag; a read
// miss fills the lowest invalid allowed way, else the allowed way with the
// largest age, in all 1, 2 or 4 sets of the block; a write miss allocates
// nothing; a used way gets age 0 and the younger ways of each set of the
// block age by one. access() returns 1 for a hit.
package tb_ref_pkg;

  class ref_cache;
    logic [11:0] tag   [4][256];
    bit          valid [4][256];
    int          age   [4][256];
    int unsigned hits, misses;

    function new();
      for (int w = 0; w < 4; w++)
        for (int s = 0; s < 256; s++) begin
          valid[w][s] = 0;
          age[w][s]   = w;
          tag[w][s]   = '0;
        end
      hits = 0;
      misses = 0;
    endfunction

    static function int blocks(int bs);
      return (bs == 0) ? 1 : (bs == 1) ? 2 : 4;
    endfunction

    static function bit allowed(int assoc, int w, logic [23:0] a);
      if (assoc == 0) return w == int'(a[13:12]);
      if (assoc == 1) return (w % 2) == int'(a[12]);
      return 1'b1;
    endfunction

    function void touch(int set0, int n, int way);
      for (int s = set0; s < set0 + n; s++) begin
        int a0 = age[way][s];
        for (int v = 0; v < 4; v++)
          if (age[v][s] < a0) age[v][s]++;
        age[way][s] = 0;
      end
    endfunction

    function bit access(bit wr, logic [23:0] a, int assoc, int bs);
      int set  = int'(a[11:4]);
      int n    = blocks(bs);
      int set0 = set - (set % n);
      int hw = -1, vw = -1, oldest = -1;
      for (int w = 3; w >= 0; w--)
        if (allowed(assoc, w, a) && valid[w][set] && tag[w][set] == a[23:12]) hw = w;
      if (hw >= 0) begin
        touch(set0, n, hw);
        hits++;
        return 1'b1;
      end
      misses++;
      if (wr) return 1'b0;
      for (int w = 3; w >= 0; w--)
        if (allowed(assoc, w, a) && !valid[w][set]) vw = w;
      if (vw < 0)
        for (int w = 0; w < 4; w++)
          if (allowed(assoc, w, a) && age[w][set] > oldest) begin
            oldest = age[w][set];
            vw = w;
          end
      for (int s = set0; s < set0 + n; s++) begin
        tag[vw][s]   = a[23:12];
        valid[vw][s] = 1'b1;
      end
      touch(set0, n, vw);
      return 1'b0;
    endfunction
  endclass

endpackage
