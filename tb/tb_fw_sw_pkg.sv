// Testbench-side model of the firewall's configuration software.
//
// The hardware relies on software preprocessing: Tree Bitmap tries for the
// prefix fields, the perfect hash (two random H3 matrices and the g table,
// found by the random acyclic graph method) and the rule table. This
// package computes them, independently of the RTL, and turns them into
// configuration writes. It also gives reference functions (longest prefix
// match, first matching rule) that the testbenches check the RTL against.
package tb_fw_sw_pkg;
  import fw_pkg::*;

  typedef struct {
    logic [19:0]  addr;
    logic [511:0] data;
  } cfg_write_t;

  // ------------------------------------------------------- Tree Bitmap
  class tbm_builder;
    int key_w, stride, levels, ptr_w, code_w;
    longint unsigned pval[$];
    int              plen[$];
    longint unsigned npath[int][$];
    int unsigned     n_ib[int][$], n_eb[int][$], n_child[int][$], n_res[int][$];

    function new(int kw, int s, int pw, int cw);
      key_w = kw; stride = s; ptr_w = pw; code_w = cw; levels = kw / s + 1;
    endfunction

    function longint unsigned top(longint unsigned v, int n);
      return (n == 0) ? 0 : (v >> (key_w - n));
    endfunction

    // add a prefix (value given as a full key_w-bit word); duplicates ignored
    function void add(longint unsigned v, int len);
      longint unsigned m = top(v, len);
      foreach (pval[i]) if (plen[i] == len && top(pval[i], len) == m) return;
      pval.push_back(v); plen.push_back(len);
    endfunction

    function bit needed(int l, longint unsigned path);
      foreach (pval[i])
        if (plen[i] >= l * stride && top(pval[i], l * stride) == path) return 1;
      return 0;
    endfunction

    function void build();
      int unsigned code = 1;
      npath.delete(); n_ib.delete(); n_eb.delete(); n_child.delete(); n_res.delete();
      npath[0].push_back(0);
      for (int l = 0; l < levels; l++) begin
        if (!npath.exists(l)) break;
        foreach (npath[l][n]) begin
          int unsigned ib = 0, eb = 0, child;
          longint unsigned p = npath[l][n];
          foreach (pval[i]) begin
            if (plen[i] / stride == l && top(pval[i], l * stride) == p) begin
              int j = plen[i] - l * stride;
              int unsigned v = int'(top(pval[i], plen[i]) & ((1 << j) - 1));
              ib |= 1 << ((1 << j) - 1 + v);
            end
          end
          child = npath.exists(l + 1) ? npath[l + 1].size() : 0;
          if (l < levels - 1)
            for (int c = 0; c < (1 << stride); c++)
              if (needed(l + 1, (p << stride) | c)) begin
                eb |= 1 << c;
                npath[l + 1].push_back((p << stride) | c);
              end
          n_ib[l].push_back(ib); n_eb[l].push_back(eb);
          n_child[l].push_back(child); n_res[l].push_back(code);
          code += $countones(ib);
        end
      end
    endfunction

    // code the hardware must return for prefix number i
    function int unsigned code_of(int i);
      int l = plen[i] / stride;
      int j = plen[i] - l * stride;
      int unsigned idx = (1 << j) - 1 + int'(top(pval[i], plen[i]) & ((1 << j) - 1));
      foreach (npath[l][n])
        if (npath[l][n] == top(pval[i], l * stride))
          return n_res[l][n] + $countones(n_ib[l][n] & ((1 << idx) - 1));
      return 0;
    endfunction

    // index of the longest prefix matching key, -1 if none
    function int lpm_index(longint unsigned key);
      int best = -1;
      foreach (pval[i])
        if (top(key, plen[i]) == top(pval[i], plen[i]) && (best < 0 || plen[i] > plen[best]))
          best = i;
      return best;
    endfunction

    function int unsigned ref_code(longint unsigned key);
      int b = lpm_index(key);
      return (b < 0) ? 0 : code_of(b);
    endfunction

    // configuration writes for the node memories
    function void writes(logic [3:0] target, ref cfg_write_t q[$]);
      foreach (npath[l]) foreach (npath[l][n]) begin
        cfg_write_t w;
        logic [63:0] d;
        d = 64'(n_ib[l][n]) | (64'(n_eb[l][n]) << ((1 << stride) - 1)) |
            (64'(n_child[l][n]) << ((1 << stride) - 1 + (1 << stride))) |
            (64'(n_res[l][n]) << ((1 << stride) - 1 + (1 << stride) + ptr_w));
        w.addr = {target, 4'(l), 12'(n)};
        w.data = 512'(d);
        q.push_back(w);
      end
    endfunction
  endclass

  // ------------------------------------------- random acyclic graph hash
  class chm_builder;
    int g_aw, nrules, key_w;
    logic [66:0]   keys[$];
    int unsigned   vals[$];
    logic [31:0]   q1[67], q2[67];
    int unsigned   g[int unsigned];
    int unsigned   parent[int unsigned];
    int            tries;

    function new(int aw, int n, int kw = 67);
      g_aw = aw; nrules = n; key_w = kw;
    endfunction

    function int unsigned h(logic [66:0] k, bit second);
      int unsigned r = 0;
      for (int i = 0; i < key_w; i++) if (k[i]) r ^= second ? q2[i] : q1[i];
      return r;
    endfunction

    function int unsigned find(int unsigned v);
      while (parent.exists(v) && parent[v] != v) v = parent[v];
      return v;
    endfunction

    function bit try_once();
      parent.delete(); g.delete();
      for (int i = 0; i < key_w; i++) begin
        q1[i] = $urandom() & ((1 << g_aw) - 1);
        q2[i] = $urandom() & ((1 << g_aw) - 1);
      end
      foreach (keys[e]) begin
        int unsigned u = h(keys[e], 0), v = h(keys[e], 1), ru, rv;
        if (u == v) return 0;
        if (!parent.exists(u)) parent[u] = u;
        if (!parent.exists(v)) parent[v] = v;
        ru = find(u); rv = find(v);
        if (ru == rv) return 0;
        parent[ru] = rv;
      end
      return 1;
    endfunction

    function bit build();
      int          adj[int unsigned][$];
      int unsigned bfs[$];
      tries = 0;
      do begin tries++; end while (!try_once() && tries < 50);
      if (tries >= 50) return 0;
      foreach (keys[e]) begin
        adj[h(keys[e], 0)].push_back(e);
        adj[h(keys[e], 1)].push_back(e);
      end
      // the graph is a forest: walk each tree from an arbitrary root. Any
      // root value works; a random one makes g1 + g2 >= N common, so the
      // modulo reduction in the hardware is exercised.
      foreach (keys[e]) begin
        int unsigned r = h(keys[e], 0);
        if (g.exists(r)) continue;
        g[r] = $urandom_range(0, nrules - 1);
        bfs.push_back(r);
        while (bfs.size() > 0) begin
          int unsigned u = bfs.pop_front();
          foreach (adj[u][k]) begin
            int ed = adj[u][k];
            int unsigned a = h(keys[ed], 0), b = h(keys[ed], 1), o;
            o = (a == u) ? b : a;
            if (!g.exists(o)) begin
              g[o] = (vals[ed] + nrules - g[u]) % nrules;
              bfs.push_back(o);
            end
          end
        end
      end
      return 1;
    endfunction

    function int unsigned eval(logic [66:0] k);
      int unsigned a = g.exists(h(k, 0)) ? g[h(k, 0)] : 0;
      int unsigned b = g.exists(h(k, 1)) ? g[h(k, 1)] : 0;
      return (a + b) % nrules;
    endfunction

    function void writes(ref cfg_write_t q[$]);
      cfg_write_t w;
      for (int i = 0; i < key_w; i++) begin
        w.addr = {CT_HASH, 16'(i)};       w.data = 512'(q1[i]); q.push_back(w);
        w.addr = {CT_HASH, 16'(128 + i)}; w.data = 512'(q2[i]); q.push_back(w);
      end
      w.addr = {CT_HASH, 16'h100}; w.data = 512'(nrules); q.push_back(w);
      foreach (g[v]) begin
        w.addr = {CT_GTAB, 16'h0};
        w.data = (512'(v) << 32) | 512'(g[v]);
        q.push_back(w);
      end
    endfunction
  endclass

  // ------------------------------------------------------------ rule set
  // Rules over source/destination IPv4 prefix, destination port prefix and
  // protocol (any, TCP, UDP); all other fields are wildcards. Rule i has
  // priority i (0 first). The class builds every table of the classifier.
  class ruleset;
    longint unsigned sip_v[$], dip_v[$], dp_v[$];
    int              sip_l[$], dip_l[$], dp_l[$];
    int              proto[$];          // 0 = any, else protocol number
    action_t         act[$];
    action_t         def_act;
    tbm_builder      t_sip, t_dip, t_sp, t_dp;
    chm_builder      chm;
    int              n_keys;

    function void add(longint unsigned sv, int sl, longint unsigned dv, int dl,
                      longint unsigned pv, int pl, int pr, action_t a);
      sip_v.push_back(sv); sip_l.push_back(sl); dip_v.push_back(dv); dip_l.push_back(dl);
      dp_v.push_back(pv); dp_l.push_back(pl); proto.push_back(pr); act.push_back(a);
    endfunction

    static function bit covers(tbm_builder t, longint unsigned rv, int rl, int p);
      return rl <= t.plen[p] && t.top(rv, rl) == t.top(t.pval[p], rl);
    endfunction

    static function int proto_code(int p);
      return (p == 6) ? 1 : (p == 17) ? 2 : 0;
    endfunction

    function bit build(int g_aw);
      t_sip = new(32, 4, 10, SIP_CW); t_dip = new(32, 4, 10, DIP_CW);
      t_sp  = new(16, 4, 10, SPORT_CW); t_dp = new(16, 4, 10, DPORT_CW);
      t_sp.add(0, 0);
      foreach (act[r]) begin
        t_sip.add(sip_v[r], sip_l[r]); t_dip.add(dip_v[r], dip_l[r]); t_dp.add(dp_v[r], dp_l[r]);
      end
      t_sip.build(); t_dip.build(); t_sp.build(); t_dp.build();
      chm = new(g_aw, NRULES);
      foreach (t_sip.pval[a]) foreach (t_dip.pval[b]) foreach (t_dp.pval[d])
        for (int c = 0; c < 3; c++) begin
          foreach (act[r]) begin
            if (covers(t_sip, sip_v[r], sip_l[r], a) && covers(t_dip, dip_v[r], dip_l[r], b) &&
                covers(t_dp, dp_v[r], dp_l[r], d) && (proto[r] == 0 || proto_code(proto[r]) == c)) begin
              cls_key_t k;
              k = '0;
              k.sip = SIP_CW'(t_sip.code_of(a)); k.dip = DIP_CW'(t_dip.code_of(b));
              k.sport = SPORT_CW'(t_sp.code_of(0)); k.dport = DPORT_CW'(t_dp.code_of(d));
              k.proto = PROTO_CW'(c);
              chm.keys.push_back(k); chm.vals.push_back(r);
              break;
            end
          end
        end
      n_keys = chm.keys.size();
      return chm.build();
    endfunction

    function void writes(ref cfg_write_t q[$]);
      cfg_write_t w;
      t_sip.writes(CT_SIP_LPM, q); t_dip.writes(CT_DIP_LPM, q);
      t_sp.writes(CT_SPORT_LPM, q); t_dp.writes(CT_DPORT_LPM, q);
      for (int i = 0; i < 256; i++) begin
        w.addr = {CT_PROTO_TAB, 16'(i)}; w.data = 512'(proto_code(i)); q.push_back(w);
        w.addr = {CT_FLAGS_TAB, 16'(i)}; w.data = '0; q.push_back(w);
      end
      for (int i = 0; i < 4; i++) begin w.addr = {CT_IFACE_TAB, 16'(i)}; w.data = '0; q.push_back(w); end
      foreach (act[r]) begin
        rule_t ru;
        ru = '0;
        ru.sip_val = 32'(sip_v[r]); ru.sip_mask = (sip_l[r] == 0) ? '0 : ~(32'hffffffff >> sip_l[r]);
        ru.dip_val = 32'(dip_v[r]); ru.dip_mask = (dip_l[r] == 0) ? '0 : ~(32'hffffffff >> dip_l[r]);
        ru.dport_lo = 16'(dp_v[r]) & ((dp_l[r] == 0) ? 16'h0 : ~(16'hffff >> dp_l[r]));
        ru.dport_hi = ru.dport_lo | ((dp_l[r] == 0) ? 16'hffff : (16'hffff >> dp_l[r]));
        ru.sport_lo = 16'h0; ru.sport_hi = 16'hffff;
        ru.proto_val = 8'(proto[r]); ru.proto_mask = (proto[r] == 0) ? 8'h0 : 8'hff;
        ru.action = act[r];
        w.addr = {CT_RULE, 16'(r)}; w.data = 512'(ru); q.push_back(w);
      end
      w.addr = {CT_RULE, 16'h8000}; w.data = 512'(def_act); q.push_back(w);
      chm.writes(q);
    endfunction

    // reference: first rule matching the header fields themselves
    function cls_result_t classify(hdr_fields_t f);
      cls_result_t res;
      res = '0;
      res.action = def_act;
      foreach (act[r]) begin
        if ((sip_l[r] == 0 || (f.sip >> (32 - sip_l[r])) == (32'(sip_v[r]) >> (32 - sip_l[r]))) &&
            (dip_l[r] == 0 || (f.dip >> (32 - dip_l[r])) == (32'(dip_v[r]) >> (32 - dip_l[r]))) &&
            (dp_l[r] == 0 || (f.dport >> (16 - dp_l[r])) == (16'(dp_v[r]) >> (16 - dp_l[r]))) &&
            (proto[r] == 0 || f.proto == 8'(proto[r]))) begin
          res.rule = RULE_W'(r); res.match = 1; res.action = act[r];
          return res;
        end
      end
      return res;
    endfunction

    // a header field record that hits rule r (or random, r < 0)
    function hdr_fields_t random_header(int r);
      hdr_fields_t f;
      f = {$urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom(), $urandom()};
      f.proto = ($urandom_range(0, 2) == 0) ? 8'd1 : ($urandom_range(0, 1) ? 8'd6 : 8'd17);
      f.iface = 2'($urandom_range(0, 2));
      if (r >= 0) begin
        if (sip_l[r] > 0) f.sip = (32'(sip_v[r]) & ~(32'hffffffff >> sip_l[r])) | (f.sip & (32'hffffffff >> sip_l[r]));
        if (dip_l[r] > 0) f.dip = (32'(dip_v[r]) & ~(32'hffffffff >> dip_l[r])) | (f.dip & (32'hffffffff >> dip_l[r]));
        if (dp_l[r] > 0) f.dport = (16'(dp_v[r]) & ~(16'hffff >> dp_l[r])) | (f.dport & (16'hffff >> dp_l[r]));
        if (proto[r] != 0) f.proto = 8'(proto[r]);
      end
      return f;
    endfunction

    // a small rule set exercising prefixes, exact ports, overlaps and drops
    function void example(int n);
      action_t a;
      for (int r = 0; r < n; r++) begin
        int sl, dl, pl;
        sl = (r % 3 == 0) ? 0 : $urandom_range(8, 32);
        dl = (r % 4 == 1) ? 0 : $urandom_range(4, 32);
        pl = (r % 2 == 0) ? 0 : ((r % 5 == 1) ? 16 : $urandom_range(2, 12));
        a = action_t'($urandom());
        if (r % 6 == 5) a.out_mask = 3'b000;        // some rules drop
        if (r % 6 == 2) a.out_mask = 3'b111;        // some copy to all lines
        add({8'd10, 24'($urandom())}, sl, {8'd192, 8'd168, 16'($urandom())}, dl,
            16'($urandom()), pl, (r % 3 == 1) ? 6 : (r % 3 == 2) ? 17 : 0, a);
      end
      def_act = '0;
    endfunction
  endclass
endpackage
