// pmc_ref_pkg: reference model of partial match compression for the
// testbenches, written independently of the RTL.
//
// The model keeps the compression cache as tags with last-use timestamps
// (the least recently used way has the smallest stamp), measures matches as
// the number of equal leading tag bits, and builds packets as a queue of
// bits pushed MSB first. It also holds a small address generator that
// produces streams with a mix of exact repeats, near repeats (a low tag bit
// changed) and new addresses, so every lookup class occurs.
package pmc_ref_pkg;

  localparam int AW = 38;

  class pmc_ref;
    int bus_w, idx_w, tag_w, ways, npart, u_w, way_w, cw;
    int lsb[8];
    bit [63:0] tags[256][8];
    bit        vld[256][8];
    longint    stamp[256][8];
    longint    now;
    // address history for the generator
    bit [AW-1:0] hist[16];
    int          nhist;

    function new(int bus_w_i, int idx_w_i, int tag_w_i, int ways_i, int npart_i,
                 int lsb0, int lsb1 = 0, int lsb2 = 0);
      bus_w = bus_w_i; idx_w = idx_w_i; tag_w = tag_w_i; ways = ways_i; npart = npart_i;
      lsb = '{lsb0, lsb1, lsb2, 0, 0, 0, 0, 0};
      u_w = AW - tag_w - idx_w;
      way_w = (ways > 1) ? $clog2(ways) : 1;
      cw = (npart == 0) ? 0 : $clog2(npart + 1);
      now = 0;
      nhist = 0;
      for (int s = 0; s < 256; s++)
        for (int w = 0; w < 8; w++) begin
          vld[s][w] = 0;
          tags[s][w] = 0;
          stamp[s][w] = longint'(w) - longint'(ways);   // way 0 is the oldest after reset
        end
    endfunction

    function bit [63:0] tag_of(bit [AW-1:0] a);
      return 64'(a >> (AW - tag_w));
    endfunction

    function int idx_of(bit [AW-1:0] a);
      return int'((a >> u_w) & ((1 << idx_w) - 1));
    endfunction

    // Number of equal bits counted down from the tag MSB.
    function int lead_eq(bit [63:0] x, bit [63:0] y);
      int n;
      n = 0;
      for (int b = tag_w - 1; b >= 0; b--) begin
        if (x[b] != y[b]) break;
        n++;
      end
      return n;
    endfunction

    // Matched length needed for class c (0 = full tag).
    function int need_len(int c);
      return (c == 0) ? tag_w : tag_w - lsb[c-1];
    endfunction

    function void lookup(bit [AW-1:0] a, output int cls, output int way, output int lru);
      int s, best;
      bit [63:0] t;
      s = idx_of(a);
      t = tag_of(a);
      best = -1;
      for (int w = 0; w < ways; w++)
        if (vld[s][w] && lead_eq(tags[s][w], t) > best) best = lead_eq(tags[s][w], t);
      cls = npart + 1;
      for (int c = npart; c >= 0; c--)
        if (best >= need_len(c)) cls = c;
      way = 0;
      if (cls <= npart)
        for (int w = ways - 1; w >= 0; w--)
          if (vld[s][w] && lead_eq(tags[s][w], t) >= need_len(cls)) way = w;
      lru = 0;
      for (int w = 1; w < ways; w++)
        if (stamp[s][w] < stamp[s][lru]) lru = w;
    endfunction

    function void update(bit [AW-1:0] a, int cls, int way, int lru);
      int s;
      s = idx_of(a);
      now++;
      if (cls == 0) stamp[s][way] = now;
      else begin
        tags[s][lru] = tag_of(a);
        vld[s][lru] = 1;
        stamp[s][lru] = now;
      end
    endfunction

    // Look up, build the packet bits and update, as the sender does.
    function void compress(bit [AW-1:0] a, output int cls, ref bit bits[$]);
      int way, lru;
      lookup(a, cls, way, lru);
      bits.delete();
      if (cls == 0) begin
        bits.push_back(1);
        for (int b = idx_w - 1; b >= 0; b--) bits.push_back(a[u_w + b]);
        for (int b = way_w - 1; b >= 0; b--) bits.push_back(way[b]);
        for (int b = u_w - 1; b >= 0; b--) bits.push_back(a[b]);
      end else if (cls == npart + 1) begin
        bits.push_back(0);
        for (int b = 0; b < cw; b++) bits.push_back(1);
        for (int b = AW - 1; b >= 0; b--) bits.push_back(a[b]);
      end else begin
        bits.push_back(0);
        for (int b = cw - 1; b >= 0; b--) bits.push_back(1'(((cls - 1) >> b) & 1));
        for (int b = idx_w - 1; b >= 0; b--) bits.push_back(a[u_w + b]);
        for (int b = way_w - 1; b >= 0; b--) bits.push_back(way[b]);
        for (int b = lsb[cls-1] - 1; b >= 0; b--) bits.push_back(a[u_w + idx_w + b]);
        for (int b = u_w - 1; b >= 0; b--) bits.push_back(a[b]);
      end
      while (bits.size() % bus_w != 0) bits.push_back(0);
      update(a, cls, way, lru);
    endfunction

    // The history holds about as many tags as the cache (at most 16).
    function int hist_cap();
      return ((1 << idx_w) * ways > 16) ? 16 : (1 << idx_w) * ways;
    endfunction

    // Next address of a stream with locality.
    function bit [AW-1:0] gen();
      bit [AW-1:0] a;
      int r, p;
      r = $urandom_range(99);
      if (nhist == 0 || r < 15) begin
        a = AW'({$urandom(), $urandom()});
      end else begin
        a = hist[$urandom_range(nhist - 1)];
        a = (a & ~((AW'(1) << u_w) - 1)) | (AW'($urandom()) & ((AW'(1) << u_w) - 1));
        if (r < 55) begin
          // exact tag repeat
        end else if (r < 85) begin
          // flip one tag bit: leaves p leading bits equal
          p = $urandom_range(tag_w - 1);
          a[AW - 1 - p] = ~a[AW - 1 - p];
        end else begin
          // change the tag MSB: no partial match
          a[AW - 1] = ~a[AW - 1];
        end
      end
      if (nhist < hist_cap()) begin
        hist[nhist] = a;
        nhist++;
      end else hist[$urandom_range(hist_cap() - 1)] = a;
      return a;
    endfunction
  endclass

endpackage
