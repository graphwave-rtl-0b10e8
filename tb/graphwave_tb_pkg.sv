// graphwave_tb_pkg: graph generation, table mapping and reference model for the GraphWave
// testbenches.
//
// graph_mapper holds a directed graph in compressed form (off/dst), maps vertex v to PE
// v / vpp, VPU v % vpp, and turns every vertex's edge list into load-bus writes:
//  - destinations in the vertex's own PE: one unicast route, or one bit-masking table entry;
//  - destinations in other PEs: an inter table entry in the source PE, and a multicast tree
//    over the mesh built from X-then-Y paths, so every packet only travels to a neighbouring
//    PE. A PE of the tree with children gets an inter table entry (its own vertices through a
//    to-PE address table word, its children through to-NoC address table words); a leaf PE is
//    reached directly with a unicast or multicast route.
//  - optional in-flight reduction: when two or more vertices of one PE point at the same vertex
//    of another PE and the PE has a spare VPU, that VPU becomes a relay: the sources point at
//    the relay instead, and the relay points at the remote vertex.
// reference() runs the same superstep semantics in software (Reduce/Apply of PR, BFS and CC)
// and gives the values the hardware must produce.
package graphwave_tb_pkg;
  import graphwave_pkg::*;

  typedef struct {
    int               pe;
    cfg_target_e      tgt;
    int               addr;
    logic [255:0]     data;
  } cfg_op_t;

  class graph_mapper;
    int rows, cols, nv, vpp, npe;
    int V;                 // graph vertices
    int off[];             // CSR offsets, size V + 1
    int dst[$];            // CSR destinations
    // extended vertices: 0..V-1 graph vertices, V.. relays
    int vpe[$], vslot[$];
    bit vrelay[$];
    int dl [][$];          // destination lists after relay insertion
    int degree[];
    cfg_op_t ops[$];
    route_t outbound[$];
    int n_mask[], n_inter[], n_tope[], n_tonoc[], n_relay[];
    int relays, mcast_routes, inter_routes, tree_packets, ucast_routes;
    // reference results
    logic [31:0] ref_val[];
    int ref_supersteps;
    longint ref_edges;

    function new(int rows_i, int cols_i, int nv_i, int vpp_i);
      rows = rows_i; cols = cols_i; nv = nv_i; vpp = vpp_i; npe = rows * cols;
      n_mask = new[npe]; n_inter = new[npe]; n_tope = new[npe]; n_tonoc = new[npe]; n_relay = new[npe];
    endfunction

    // random graph: avg_deg random edges per vertex, plus extra in-edges into vertex hub
    // from hub_fanin vertices, and a few wide fan-out vertices
    function void random_graph(int nvert, int avg_deg, int hub, int hub_fanin, int wide);
      int tmp [][$];
      V = nvert;
      tmp = new[V];
      for (int u = 0; u < V; u++) begin
        int d;
        d = (u < wide) ? V / 2 : $urandom_range(2 * avg_deg);
        for (int k = 0; k < d; k++) begin
          int t;
          t = $urandom_range(V - 1);
          if (t != u && !has(tmp[u], t)) tmp[u].push_back(t);
        end
      end
      for (int k = 0; k < hub_fanin; k++) begin
        int u;
        u = $urandom_range(V - 1);
        if (u != hub && !has(tmp[u], hub)) tmp[u].push_back(hub);
      end
      off = new[V + 1];
      dst.delete();
      off[0] = 0;
      for (int u = 0; u < V; u++) begin
        foreach (tmp[u][k]) dst.push_back(tmp[u][k]);
        off[u + 1] = dst.size();
      end
    endfunction

    static function bit has(int q[$], int x);
      foreach (q[i]) if (q[i] == x) return 1;
      return 0;
    endfunction

    function int hops(int a, int b);
      int ar, ac, br, bc;
      ar = a / cols; ac = a % cols; br = b / cols; bc = b % cols;
      return ((ar > br) ? ar - br : br - ar) + ((ac > bc) ? ac - bc : bc - ac);
    endfunction

    function void add_op(int pe, cfg_target_e tgt, int addr, logic [255:0] data);
      cfg_op_t o;
      o.pe = pe; o.tgt = tgt; o.addr = addr; o.data = data;
      ops.push_back(o);
    endfunction

    // route that delivers to the slots in list inside PE p
    function route_t local_route(int p, int list[$]);
      route_t r;
      if (list.size() == 1) begin
        r.kind = K_UCAST; r.addr = ADDR_W'(vslot[list[0]]);
        ucast_routes++;
      end else begin
        logic [255:0] mask;
        mask = '0;
        foreach (list[i]) mask[vslot[list[i]]] = 1'b1;
        r.kind = K_MCAST; r.addr = ADDR_W'(n_mask[p]);
        add_op(p, CFG_BITMASK, n_mask[p], mask);
        n_mask[p]++;
        mcast_routes++;
      end
      return r;
    endfunction

    // multicast tree node n: local destinations per PE in at[], children in kids[]
    function route_t build_node(int n, ref int at [][$], ref int kids [][$]);
      route_t r;
      inter_entry_t e;
      noc_route_t nr [$];
      route_t lr;
      if (kids[n].size() == 0) return local_route(n, at[n]);
      foreach (kids[n][i]) begin
        noc_route_t x;
        x.dest  = PE_W'(kids[n][i]);
        x.route = build_node(kids[n][i], at, kids);
        nr.push_back(x);
        tree_packets++;
      end
      e = '0;
      if (at[n].size() != 0) begin
        lr = local_route(n, at[n]);
        e.pe_base = ADDR_W'(n_tope[n]); e.pe_cnt = 1;
        add_op(n, CFG_TOPE, n_tope[n], 256'(lr));
        n_tope[n]++;
      end
      e.noc_base = ADDR_W'(n_tonoc[n]); e.noc_cnt = CNT_W'(nr.size());
      foreach (nr[i]) begin
        add_op(n, CFG_TONOC, n_tonoc[n], 256'(nr[i]));
        n_tonoc[n]++;
      end
      r.kind = K_INTER; r.addr = ADDR_W'(n_inter[n]);
      add_op(n, CFG_INTER, n_inter[n], 256'(e));
      n_inter[n]++;
      inter_routes++;
      return r;
    endfunction

    function void add_child(ref int kids [][$], input int a, input int b);
      if (!has(kids[a], b)) kids[a].push_back(b);
    endfunction

    function route_t map_vertex(int u);
      int at [][$];
      int kids [][$];
      int s;
      bit remote;
      at = new[npe]; kids = new[npe];
      s = vpe[u];
      remote = 0;
      if (dl[u].size() == 0) begin
        route_t r;
        r.kind = K_NONE; r.addr = '0;
        return r;
      end
      foreach (dl[u][i]) begin
        at[vpe[dl[u][i]]].push_back(dl[u][i]);
        if (vpe[dl[u][i]] != s) remote = 1;
      end
      if (!remote) return local_route(s, at[s]);
      // X-then-Y paths from s to every destination PE form a tree rooted at s
      for (int d = 0; d < npe; d++)
        if (d != s && at[d].size() != 0) begin
          int r, c, dr, dc, cur;
          r = s / cols; c = s % cols; dr = d / cols; dc = d % cols;
          cur = s;
          while (c != dc) begin
            c = (dc > c) ? c + 1 : c - 1;
            add_child(kids, cur, r * cols + c);
            cur = r * cols + c;
          end
          while (r != dr) begin
            r = (dr > r) ? r + 1 : r - 1;
            add_child(kids, cur, r * cols + c);
            cur = r * cols + c;
          end
        end
      return build_node(s, at, kids);
    endfunction

    function void map_graph(bit use_relays);
      ops.delete(); vpe.delete(); vslot.delete(); vrelay.delete(); outbound.delete();
      relays = 0; mcast_routes = 0; inter_routes = 0; tree_packets = 0; ucast_routes = 0;
      foreach (n_mask[p]) begin n_mask[p] = 0; n_inter[p] = 0; n_tope[p] = 0; n_tonoc[p] = 0; n_relay[p] = 0; end
      degree = new[V];
      for (int u = 0; u < V; u++) begin
        vpe.push_back(u / vpp); vslot.push_back(u % vpp); vrelay.push_back(0);
        degree[u] = off[u + 1] - off[u];
      end
      dl = new[V + npe * (nv - vpp)];
      for (int u = 0; u < V; u++)
        for (int k = off[u]; k < off[u + 1]; k++) dl[u].push_back(dst[k]);
      if (use_relays) begin
        for (int p = 0; p < npe; p++) begin
          int cnt [int];
          for (int u = p * vpp; u < (p + 1) * vpp && u < V; u++)
            foreach (dl[u][k])
              if (vpe[dl[u][k]] != p) begin
                if (cnt.exists(dl[u][k])) cnt[dl[u][k]]++;
                else cnt[dl[u][k]] = 1;
              end
          foreach (cnt[t]) begin
            int rid;
            if (cnt[t] < 2 || n_relay[p] >= nv - vpp) continue;
            rid = vpe.size();
            vpe.push_back(p); vslot.push_back(vpp + n_relay[p]); vrelay.push_back(1);
            n_relay[p]++;
            relays++;
            dl[rid].push_back(t);
            for (int u = p * vpp; u < (p + 1) * vpp && u < V; u++)
              foreach (dl[u][k])
                if (dl[u][k] == t) dl[u][k] = rid;
          end
        end
      end
      for (int x = 0; x < vpe.size(); x++) begin
        vpu_cfg_t c;
        route_t r;
        r = map_vertex(x);
        outbound.push_back(r);
        c.enable = 1; c.relay = vrelay[x]; c.outbound = r;
        c.degree = (x < V) ? DEG_W'(degree[x]) : '0;
        add_op(vpe[x], CFG_VPU_CFG, vslot[x], 256'(c));
      end
    endfunction

    function logic [31:0] init_val(alg_e alg, int v, int src);
      case (alg)
        ALG_BFS: return (v == src) ? 32'd0 : VAL_INF;
        ALG_CC:  return 32'(v);
        default: return 32'(32'h0001_0000 / V);
      endcase
    endfunction

    function bit init_active(alg_e alg, int v, int src);
      return (alg == ALG_BFS) ? (v == src) : 1'b1;
    endfunction

    // initial values; relays are initialised with value 0, inactive
    function void init_ops(alg_e alg, int src);
      for (int x = 0; x < vpe.size(); x++) begin
        vpu_init_t iv;
        iv.active = (x < V) ? init_active(alg, x, src) : 1'b0;
        iv.val    = (x < V) ? init_val(alg, x, src) : '0;
        add_op(vpe[x], CFG_VPU_INIT, vslot[x], 256'(iv));
      end
    endfunction

    function void reference(alg_e alg, logic [31:0] alpha, int max_ss, int src);
      logic [31:0] acc [];
      bit act [];
      bit any;
      acc = new[V]; act = new[V]; ref_val = new[V];
      for (int v = 0; v < V; v++) begin
        ref_val[v] = init_val(alg, v, src);
        act[v] = init_active(alg, v, src);
        acc[v] = (alg == ALG_PR) ? '0 : ref_val[v];
      end
      ref_supersteps = 0;
      ref_edges = 0;
      do begin
        for (int u = 0; u < V; u++)
          if (act[u] && off[u + 1] > off[u]) begin
            logic [31:0] m;
            m = (alg == ALG_BFS) ? ((ref_val[u] == VAL_INF) ? VAL_INF : ref_val[u] + 1) : ref_val[u];
            for (int k = off[u]; k < off[u + 1]; k++) begin
              int t;
              t = dst[k];
              ref_edges++;
              if (alg == ALG_PR) acc[t] = acc[t] + m;
              else if (m < acc[t]) acc[t] = m;
            end
          end
        any = 0;
        for (int v = 0; v < V; v++) begin
          logic [31:0] nv_;
          case (alg)
            ALG_PR: begin
              logic [63:0] prod;
              logic [31:0] num;
              prod = 64'(32'h0001_0000 - alpha) * 64'(acc[v]);
              num = alpha + prod[47:16];
              nv_ = (degree[v] != 0) ? num / 32'(degree[v]) : num;
              acc[v] = 0;
              act[v] = 1;
            end
            ALG_BFS: begin
              nv_ = acc[v];
              act[v] = (nv_ != ref_val[v]);
            end
            default: begin
              nv_ = (acc[v] < ref_val[v]) ? acc[v] : ref_val[v];
              act[v] = (nv_ != ref_val[v]);
            end
          endcase
          ref_val[v] = nv_;
          any |= act[v];
        end
        ref_supersteps++;
      end while (any && (max_ss == 0 || ref_supersteps < max_ss));
    endfunction
  endclass
endpackage
