// gbs_ref_pkg: bit-level reference model of the greedy buddy allocation policy,
// written as plain loops over the bit-map (no trees) so the testbenches can
// check the RTL against it.
//
// Policy: k = ceil(log2 size). Look for the lowest aligned run of 2^k free
// blocks; if there is none, look for the lowest aligned run of 2^(k-1) free
// blocks (second chance; 2^0 stays 2^0). From the start of the buddy found, walk
// left over free blocks to get the expanded start. The request fails if no
// buddy was found (check1), if start + size > blocks (check2) or if any block
// of start .. start+size-1 inside the storage is allocated (check3).
package gbs_ref_pkg;

  typedef struct {
    bit          second_chance;  // the first search failed
    bit          check1;
    bit          check2;
    bit          check3;
    bit          fail;
    int unsigned buddy;          // start of the buddy found
    int unsigned addr;           // expanded start
  } alloc_t;

  class gbs_ref #(int unsigned LOG2 = 4);
    localparam int unsigned NB = 2 ** LOG2;
    bit map [NB];

    function new();
      foreach (map[i]) map[i] = 1'b0;
    endfunction

    static function int unsigned ceil_log2(int unsigned v);
      int unsigned k = 0;
      while ((1 << k) < v) k++;
      return k;
    endfunction

    // Lowest aligned free run of 2^k blocks; returns -1 if none.
    function int find_buddy(int unsigned k);
      int unsigned bs = 1 << k;
      for (int unsigned b = 0; b < NB; b += bs) begin
        bit free = 1'b1;
        for (int unsigned i = b; i < b + bs; i++) if (map[i]) free = 1'b0;
        if (free) return int'(b);
      end
      return -1;
    endfunction

    function alloc_t try_alloc(int unsigned size);
      alloc_t r;
      int unsigned k = ceil_log2(size);
      int b;
      r = '{default: 0};
      b = find_buddy(k);
      if (b < 0) begin
        r.second_chance = 1'b1;
        b = find_buddy(k == 0 ? 0 : k - 1);
      end
      if (b < 0) begin
        r.check1 = 1'b1;
        r.fail = 1'b1;
        return r;
      end
      r.buddy = int'(b);
      r.addr  = int'(b);
      while (r.addr > 0 && !map[r.addr-1]) r.addr--;
      r.check2 = (r.addr + size > NB);
      for (int unsigned i = r.addr; i < r.addr + size && i < NB; i++)
        if (map[i]) r.check3 = 1'b1;
      r.fail = r.check2 | r.check3;
      return r;
    endfunction

    // Allocation with bit-map update on success.
    function alloc_t alloc(int unsigned size);
      alloc_t r = try_alloc(size);
      if (!r.fail) for (int unsigned i = r.addr; i < r.addr + size; i++) map[i] = 1'b1;
      return r;
    endfunction

    function void release_area(int unsigned addr, int unsigned size);
      for (int unsigned i = addr; i < addr + size && i < NB; i++) map[i] = 1'b0;
    endfunction

    function logic [NB-1:0] vec();
      logic [NB-1:0] v;
      for (int unsigned i = 0; i < NB; i++) v[i] = map[i];
      return v;
    endfunction

    function void load(logic [NB-1:0] v);
      for (int unsigned i = 0; i < NB; i++) map[i] = v[i];
    endfunction

    // Statistics of a bit-map used by the evaluation.
    function int unsigned allocated();
      int unsigned c = 0;
      foreach (map[i]) c += map[i];
      return c;
    endfunction

    function int unsigned max_free_run();
      int unsigned best = 0, run = 0;
      foreach (map[i]) begin
        run = map[i] ? 0 : run + 1;
        if (run > best) best = run;
      end
      return best;
    endfunction

    // Number of maximal free runs (external fragments).
    function int unsigned fragments();
      int unsigned c = 0;
      foreach (map[i]) if (!map[i] && (i == 0 || map[i-1])) c++;
      return c;
    endfunction

    // Highest allocated address, -1 if the map is empty.
    function int highest();
      int h = -1;
      foreach (map[i]) if (map[i]) h = i;
      return h;
    endfunction
  endclass

  // Bit-map written as in the text, block 0 first: "1110000011111000".
  function automatic logic [15:0] map16(string s);
    logic [15:0] v;
    for (int i = 0; i < 16; i++) v[i] = (s[i] == "1");
    return v;
  endfunction

endpackage
