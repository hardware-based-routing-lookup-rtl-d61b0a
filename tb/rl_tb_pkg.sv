// rl_tb_pkg: reference model for the lookup-engine testbenches.
//
// fib_model holds a list of routes <prefix, length, next hop> and does three
// things, all without looking at the RTL:
//   * lpm():   longest-prefix match straight from the route list (one probe
//              per prefix length), the expected answer of every lookup;
//   * build(): turns the route list into the five-level table layout (prefix
//              expansion into groups of 256/256/8/32/256 entries, index entries
//              for prefixes that have longer routes below them, and level-3
//              promotion of level-4 groups with exactly one used child), kept in
//              a shadow copy and in a list of download writes;
//   * walk():  follows the shadow tables the way the hardware does, giving the
//              level at which a lookup is decided and whether promotion fired.
// gen_random() fills the route list. The lower half of the address space gets
// nested routes of every length with next hops below 128 (level-5 entries hold
// only 7 bits of next hop); the upper half gets routes up to /24 with 14-bit
// next hops; a few lone /24 routes create promotable groups. gen_backbone()
// makes a table of backbone size and shape instead: most routes /24, then
// /20../23, /16 and /19, about 1% longer than /24, all inside a pool of /16
// blocks, with next hops below 128. used_bytes() is the part of the banks a
// built table occupies.
package rl_tb_pkg;
  import rl_pkg::*;

  typedef struct {
    logic [2:0]            level;
    logic [MEM_AW_MAX-1:0] addr;
    logic [MEM_DW_MAX-1:0] data;
  } wr_t;

  class fib_model;
    int        rmap[33][bit [31:0]];  // routes by length: prefix -> next hop
    bit        longer[5][bit [31:0]]; // level-k prefixes with longer routes below
    bit [31:0] r_pfx[$];
    int        r_len[$];
    int        r_nh[$];
    bit [31:0] tbl[5][int];   // shadow of the five banks
    int        next_seg[7];
    wr_t       writes[$];
    bit        promotion;
    int        n_promoted;
    bit [31:0] promo_pfx[$];  // /24 prefixes that were promoted
    int        bad_build;

    function new(bit promo = 1'b1);
      promotion = promo;
    endfunction

    static function bit [31:0] mask(int len);
      return (len == 0) ? 32'h0 : (32'hffff_ffff << (32 - len));
    endfunction

    function void add_route(bit [31:0] pfx, int len, int nh);
      if (rmap[len].exists(pfx & mask(len))) return;
      rmap[len][pfx & mask(len)] = nh;
      r_pfx.push_back(pfx & mask(len));
      r_len.push_back(len);
      r_nh.push_back(nh);
    endfunction

    // Longest route of length <= maxlen that covers address a.
    function void lpm_upto(bit [31:0] a, int maxlen, output bit hit, output int nh);
      hit = 0;
      nh  = 0;
      for (int len = maxlen; len >= 0; len--)
        if (rmap[len].exists(a & mask(len))) begin
          hit = 1;
          nh  = rmap[len][a & mask(len)];
          return;
        end
    endfunction

    function void lpm(bit [31:0] a, output bit hit, output int nh);
      lpm_upto(a, 32, hit, nh);
    endfunction

    // Does a route longer than plen (a level boundary) lie under pfx?
    function bit has_longer(bit [31:0] pfx, int plen);
      int k;
      for (k = 1; k < 5; k++) if (blen(k) == plen) break;
      return longer[k].exists(pfx);
    endfunction

    static function int blen(int lvl);
      case (lvl)
        1: return 8;
        2: return 16;
        3: return 19;
        4: return 24;
        default: return 32;
      endcase
    endfunction

    function void put(int lvl, int addr, bit [31:0] data);
      wr_t w;
      tbl[lvl-1][addr] = data;
      w.level = 3'(lvl);
      w.addr  = MEM_AW_MAX'(addr);
      w.data  = data;
      writes.push_back(w);
    endfunction

    // Place {valid, index, ptr} at the top of the level's entry.
    static function bit [31:0] pack(int lvl, bit v, bit ix, int ptr);
      bit [15:0] e;
      e = {v, ix, 14'(ptr)};
      return (lvl == 3) ? {e, 16'h0} : {16'h0, e};
    endfunction

    function void build_group(int lvl, bit [31:0] base, int seg);
      int fw, lsb, plen, addr, c, nh, nv, nx, vnh, voff;
      bit hit;
      bit [31:0] pfx, data, ce;
      fw   = field_w(lvl);
      lsb  = field_lsb(lvl);
      plen = blen(lvl);
      for (int v = 0; v < (1 << fw); v++) begin
        pfx  = base | (32'(v) << lsb);
        addr = (lvl == 1) ? v : ((seg << fw) | v);
        if (lvl < 5 && has_longer(pfx, plen)) begin
          c = next_seg[lvl+1]++;
          if (c >= (1 << PTR_W)) bad_build++;
          build_group(lvl + 1, pfx, c);
          data = pack(lvl, 0, 1, c);
          if (lvl == 3 && promotion) begin
            nv = 0; nx = 0; vnh = 0; voff = 0;
            for (int i = 0; i < 32; i++) begin
              ce = tbl[3][(c << 5) | i];
              if (ce[15]) begin nv++; vnh = int'(ce[13:0]); voff = i; end
              if (ce[14]) nx++;
            end
            if (nv == 1 && nx == 0 && vnh < (1 << PROMO_NH_W)) begin
              data = {2'b11, 14'(c), 11'(vnh), 5'(voff)};
              n_promoted++;
              promo_pfx.push_back(pfx | (32'(voff) << 8));
            end
          end
        end else begin
          lpm_upto(pfx, plen, hit, nh);
          if (lvl == 5) begin
            if (hit && nh >= (1 << L5_NH_W)) bad_build++;
            data = hit ? {24'h0, 1'b1, 7'(nh)} : 32'h0;
          end else begin
            data = hit ? pack(lvl, 1, 0, nh) : 32'h0;
          end
        end
        put(lvl, addr, data);
      end
    endfunction

    function void build();
      for (int l = 0; l < 5; l++) tbl[l].delete();
      writes.delete();
      promo_pfx.delete();
      foreach (next_seg[i]) next_seg[i] = 0;
      n_promoted = 0;
      bad_build  = 0;
      for (int k = 1; k < 5; k++) begin
        longer[k].delete();
        foreach (r_len[i]) if (r_len[i] > blen(k)) longer[k][r_pfx[i] & mask(blen(k))] = 1;
      end
      build_group(1, 32'h0, 0);
    endfunction

    // Walk the shadow tables as the pipeline does.
    function void walk(bit [31:0] a, output bit hit, output int nh, output int level,
                       output bit promo_hit, output bit promo_miss);
      int seg, addr;
      bit [31:0] d;
      bit [15:0] e;
      seg = 0; hit = 0; nh = 0; level = 0; promo_hit = 0; promo_miss = 0;
      for (int lvl = 1; lvl <= 5; lvl++) begin
        addr = (lvl == 1) ? int'(a[31:24])
                          : ((seg << field_w(lvl)) | int'((a >> field_lsb(lvl)) & ((1 << field_w(lvl)) - 1)));
        d = tbl[lvl-1].exists(addr) ? tbl[lvl-1][addr] : 32'h0;
        level = lvl;
        if (lvl == 5) begin
          hit = d[7];
          nh  = hit ? int'(d[6:0]) : 0;
          return;
        end
        e = (lvl == 3) ? d[31:16] : d[15:0];
        if (lvl == 3 && promotion && e[15] && e[14]) begin
          if (d[4:0] == a[12:8]) begin
            hit = 1; nh = int'(d[15:5]); promo_hit = 1;
            return;
          end
          promo_miss = 1;
          seg = int'(e[13:0]);
        end else if (e[15]) begin
          hit = 1; nh = int'(e[13:0]);
          return;
        end else if (e[14]) begin
          seg = int'(e[13:0]);
        end else begin
          return;
        end
      end
    endfunction

    function void gen_random(int n);
      bit [31:0] p;
      int len, r, o1, o2;
      // nested routes in the lower half, next hops < 128
      for (int i = 0; i < n; i++) begin
        r  = $urandom_range(99);
        o1 = 10 + $urandom_range(2);
        o2 = $urandom_range(5);
        if (r < 5)       len = 8;
        else if (r < 20) len = 9 + $urandom_range(7);
        else if (r < 35) len = 17 + $urandom_range(2);
        else if (r < 75) len = 20 + $urandom_range(4);
        else             len = 25 + $urandom_range(7);
        p = {8'(o1), 8'(o2), 16'($urandom_range(16'hffff) & 16'h1fff)} | (32'($urandom_range(3)) << 13);
        add_route(p, len, 1 + $urandom_range(126));
      end
      // short routes with wide next hops in the upper half
      for (int i = 0; i < n / 2; i++) begin
        len = 1 + $urandom_range(23);
        p   = $urandom() | 32'h8000_0000;
        if (len < 2) len = 2;
        add_route(p, len, 1 + $urandom_range(16382));
      end
      // lone /24 routes: each the only route in its /19 (promotion candidates)
      for (int i = 0; i < 6; i++)
        add_route({8'd20, 8'(i), 3'($urandom_range(7)), 5'($urandom_range(31)), 8'h0}, 24,
                  1 + $urandom_range(126));
      // a lone /27 so that a level-4 group holds an index and is not promoted
      add_route({8'd21, 8'd5, 8'd77, 3'd2, 5'd0}, 27, 99);
    endfunction

    function void gen_backbone(int n, int blocks);
      bit [15:0] pool[];
      bit [31:0] p;
      int r, len;
      pool = new[blocks];
      foreach (pool[i]) pool[i] = {8'(128 + $urandom_range(95)), 8'($urandom())};
      while (r_len.size() < n) begin
        r = $urandom_range(999);
        p = {pool[$urandom_range(blocks - 1)], 16'($urandom())};
        if (r < 10) begin
          len = 8 + $urandom_range(7);
          p   = {8'(1 + $urandom_range(222)), 24'($urandom())};
        end
        else if (r < 110) len = 16;
        else if (r < 150) len = 17 + $urandom_range(1);
        else if (r < 210) len = 19;
        else if (r < 420) len = 20 + $urandom_range(3);
        else if (r < 990) len = 24;
        else              len = 25 + $urandom_range(7);
        add_route(p, len, 1 + $urandom_range(126));
      end
    endfunction

    // Bytes of the five banks that hold groups of a built table.
    function longint used_bytes();
      return 64'(1 << field_w(1)) * 2 + 64'(next_seg[2]) * 256 * 2 + 64'(next_seg[3]) * 8 * 4
           + 64'(next_seg[4]) * 32 * 2 + 64'(next_seg[5]) * 256 * 1;
    endfunction

    // A destination address: mostly inside a random route, sometimes in a
    // promoted /19 region, sometimes anywhere.
    function bit [31:0] pick_addr();
      int i, r;
      r = $urandom_range(99);
      if (r < 15 && promo_pfx.size() > 0) begin
        i = $urandom_range(promo_pfx.size() - 1);
        // half: inside the promoted /24, half: elsewhere in its /19
        if ($urandom_range(1)) return promo_pfx[i] | 32'($urandom_range(255));
        return (promo_pfx[i] & mask(19)) | 32'($urandom_range(8191));
      end
      if (r < 85) begin
        i = $urandom_range(r_len.size() - 1);
        return r_pfx[i] | ($urandom() & ~mask(r_len[i]));
      end
      return $urandom();
    endfunction
  endclass

endpackage
