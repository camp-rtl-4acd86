// camp_model_pkg: reference model and table builder for the CAMP engine testbenches.
//
// camp_model generates a random IPv4 routing table, builds the uni-bit trie for every prefix
// longer than the initial stride, maps its nodes onto the ring of stages and produces the words
// the control plane writes: one direct-table entry per value of the initial bits and one trie
// node per (stage, address). The mapping obeys the rules a lookup engine of this kind relies on:
// a child sits at least one stage after its parent (wrapping around), stages may be skipped
// (the lookup passes them as no-ops), and every path ends before a full circle. A skip is taken
// only if the deepest path below the child still ends within the ring. Optionally the nodes at
// a chosen depth of a sub-trie become roots of child sub-tries, each mapped from a random stage
// and reached through a re-entry pointer (adaptive splitting of a trie).
// The reference answer of a lookup tries every prefix length from 32 down in a table of the
// prefixes, independent of the trie.
package camp_model_pkg;
  import camp_pkg::*;

  typedef struct {
    int c[2];      // child node index, -1 if none
    bit pv;
    int nh;
    int depth;     // address bits consumed when this node is evaluated
    int offs;      // stage offset from the sub-trie root
    int stage;
    int addr;
    bit xroot;     // root of a child sub-trie mapped on its own (adaptive splitting)
  } mnode_t;

  class camp_model;
    int num_stages, init_stride;
    logic [31:0] pval[$];
    int          plen[$];
    int          pnh[$];
    int          pidx[longint];     // (length, value) -> prefix index
    mnode_t      nodes[$];
    int          root_of[int];      // direct-table index -> root node
    int          root_stage[int];   // forced root stage per direct-table index
    int          split_depth[int];  // direct-table index -> depth at which child sub-tries start
    int          n_child_roots;
    int          next_addr[];
    int          skips;

    function new(int ns, int is);
      num_stages  = ns;
      init_stride = is;
      next_addr   = new[ns];
      skips       = 0;
      n_child_roots = 0;
    endfunction

    static function logic [31:0] pmask(int len);
      return (len == 0) ? 32'h0 : ~(32'hFFFF_FFFF >> len);
    endfunction

    static function longint pkey(logic [31:0] v, int len);
      return (longint'(len) << 32) | longint'(v & pmask(len));
    endfunction

    function bit has_prefix(logic [31:0] v, int len);
      return pidx.exists(pkey(v, len));
    endfunction

    function void add_prefix(logic [31:0] v, int len, int nh);
      v = v & pmask(len);
      if (has_prefix(v, len)) return;
      pidx[pkey(v, len)] = pval.size();
      pval.push_back(v);
      plen.push_back(len);
      pnh.push_back(nh);
    endfunction

    // Random prefix below the first init_stride bits 'top', of length len.
    function void add_under(int top, int len);
      logic [31:0] v;
      v = {$urandom} & ~pmask(init_stride);
      v = v | (32'(top) << (32 - init_stride));
      add_prefix(v, len, int'($urandom_range(255)));
    endfunction

    function automatic int new_node(int depth, int offs);
      mnode_t n;
      n.c[0] = -1; n.c[1] = -1; n.pv = 0; n.nh = 0;
      n.depth = depth; n.offs = offs; n.stage = -1; n.addr = -1; n.xroot = 0;
      nodes.push_back(n);
      return nodes.size() - 1;
    endfunction

    // Build the sub-tries and map them onto the ring.
    function void build();
      for (int i = 0; i < plen.size(); i++) begin
        int top, cur;
        if (plen[i] <= init_stride) continue;
        top = int'(pval[i] >> (32 - init_stride));
        if (!root_of.exists(top)) root_of[top] = new_node(init_stride, 0);
        cur = root_of[top];
        for (int d = init_stride; d < plen[i]; d++) begin
          int b;
          b = int'(pval[i][31 - d]);
          if (nodes[cur].c[b] < 0) begin
            int nn;
            nn = new_node(d + 1, 0);
            nodes[cur].c[b] = nn;
          end
          cur = nodes[cur].c[b];
        end
        nodes[cur].pv = 1;
        nodes[cur].nh = pnh[i];
      end
      foreach (root_of[top]) begin
        int rs;
        rs = root_stage.exists(top) ? root_stage[top] : int'($urandom_range(num_stages - 1));
        if (split_depth.exists(top)) mark_split(root_of[top], split_depth[top]);
        void'(height(root_of[top]));
        set_offsets(root_of[top], 0);
        place(root_of[top], rs);
      end
    endfunction

    // Nodes at depth sd become roots of child sub-tries, each mapped from a stage of its own.
    function void mark_split(int n, int sd);
      if (nodes[n].depth == sd) begin
        nodes[n].xroot = 1;
        n_child_roots++;
        return;
      end
      for (int b = 0; b < 2; b++) if (nodes[n].c[b] >= 0) mark_split(nodes[n].c[b], sd);
    endfunction

    int hgt[int];   // node -> number of levels below it

    function int height(int n);
      int h;
      h = 0;
      for (int b = 0; b < 2; b++)
        if (nodes[n].c[b] >= 0) begin
          int hc;
          hc = height(nodes[n].c[b]) + 1;
          if (hc > h) h = hc;
        end
      hgt[n] = h;
      return h;
    endfunction

    // A child goes one stage after its parent, or two (skipping one stage) when its deepest
    // descendant still ends before the ring closes.
    function void set_offsets(int n, int offs);
      nodes[n].offs = offs;
      for (int b = 0; b < 2; b++) begin
        int c, o;
        c = nodes[n].c[b];
        if (c < 0) continue;
        if (nodes[c].xroot) begin
          set_offsets(c, 0);
          continue;
        end
        o = offs + 1;
        if ($urandom_range(3) == 0 && o + 1 + hgt[c] <= num_stages - 1) begin
          o++;
          skips++;
        end
        set_offsets(c, o);
      end
    endfunction

    function void place(int n, int rs);
      int s;
      s = (rs + nodes[n].offs) % num_stages;
      nodes[n].stage = s;
      nodes[n].addr  = next_addr[s];
      next_addr[s]++;
      for (int b = 0; b < 2; b++) begin
        int c;
        c = nodes[n].c[b];
        if (c < 0) continue;
        if (nodes[c].xroot) place(c, int'($urandom_range(num_stages - 1)));
        else place(c, rs);
      end
    endfunction

    function trie_node_t node_word(int n);
      trie_node_t w;
      w = '0;
      w.pfx_valid = nodes[n].pv;
      w.pfx_nh    = NH_W'(nodes[n].nh);
      for (int b = 0; b < 2; b++) begin
        if (nodes[n].c[b] >= 0) begin
          w.child[b].valid = 1'b1;
          w.child[b].xfer  = nodes[nodes[n].c[b]].xroot;
          w.child[b].stage = STAGE_W'(nodes[nodes[n].c[b]].stage);
          w.child[b].addr  = NODE_AW'(nodes[nodes[n].c[b]].addr);
        end
      end
      return w;
    endfunction

    function dt_entry_t dt_word(int top);
      dt_entry_t e;
      int best;
      e = '0;
      best = -1;
      for (int len = init_stride; len >= 0 && best < 0; len--) begin
        logic [31:0] v;
        v = 32'(top) << (32 - init_stride);
        if (pidx.exists(pkey(v, len))) best = pidx[pkey(v, len)];
      end
      if (best >= 0) begin
        e.pfx_valid = 1'b1;
        e.pfx_nh    = NH_W'(pnh[best]);
      end
      if (root_of.exists(top)) begin
        e.root.valid = 1'b1;
        e.root.stage = STAGE_W'(nodes[root_of[top]].stage);
        e.root.addr  = NODE_AW'(nodes[root_of[top]].addr);
      end
      return e;
    endfunction

    // Reference longest-prefix match.
    function lookup_res_t ref_lookup(logic [31:0] a);
      lookup_res_t r;
      int best;
      best = -1;
      for (int len = 32; len >= 0 && best < 0; len--)
        if (pidx.exists(pkey(a, len))) best = pidx[pkey(a, len)];
      r = '0;
      r.status = (best >= 0) ? RES_MATCH : RES_NO_MATCH;
      r.nh     = (best >= 0) ? NH_W'(pnh[best]) : '0;
      return r;
    endfunction

    // Address that falls under prefix i, with random remaining bits.
    function logic [31:0] addr_under(int i);
      return pval[i] | ({$urandom} & ~pmask(plen[i]));
    endfunction

    // Stage offset, from the sub-trie root, of the last node a lookup of address a evaluates;
    // -1 when the direct table alone answers it, -2 when it re-enters at a child sub-trie root.
    function int last_offset(logic [31:0] a);
      int top, cur, nxt;
      top = int'(a >> (32 - init_stride));
      if (!root_of.exists(top)) return -1;
      cur = root_of[top];
      forever begin
        if (nodes[cur].depth >= 32) return nodes[cur].offs;
        nxt = nodes[cur].c[a[31 - nodes[cur].depth]];
        if (nxt < 0) return nodes[cur].offs;
        if (nodes[nxt].xroot) return -2;
        cur = nxt;
      end
    endfunction

    function int max_stage_fill();
      int m;
      m = 0;
      foreach (next_addr[s]) if (next_addr[s] > m) m = next_addr[s];
      return m;
    endfunction
  endclass

endpackage
