// graphwave_top_tb: end-to-end test of the accelerator on a reduced array (2 x 3 PEs of 16
// VPUs, 12 vertices per PE, 4 spare VPUs for relays) with a behavioural NoC.
//
// A random graph with a high fan-in vertex and wide fan-out vertices is mapped onto the tables
// (unicast, bit-masking multicast, inter-PE multicast trees and in-flight-reduction relays) and
// loaded over the load bus. It then runs BFS (until no vertex is active), connected components
// and PageRank (for a fixed number of supersteps) and compares every vertex value and the
// superstep count with the software reference. It counts the mechanisms of the design and
// fails if one never happened: unicast and multicast delivery, a multicast that writes many
// VPUs in one cycle, packets relayed by an intermediate PE, packets delivered to a leaf PE,
// arbiter stalls on a full FIFO, relay flushes, runs ended by inactivity and by the superstep
// limit, all three algorithms. It also reports the throughput in edges per cycle.
module graphwave_top_tb;
  import graphwave_pkg::*;
  import graphwave_tb_pkg::*;

  localparam int ROWS = 2, COLS = 3, NV = 16, VPP = 12;
  localparam int NPE = ROWS * COLS;
  localparam int CFG_W = 64;

  logic clk = 0, rst_n = 0;
  alg_e alg = ALG_BFS;
  logic [VAL_W-1:0] pr_alpha = 32'd9830;
  logic [15:0] max_supersteps = '0;
  logic start = 0, busy, done;
  logic [15:0] supersteps;
  logic [31:0] cycles, edges, in_flight;
  logic cfg_we = 0;
  logic [PE_W-1:0] cfg_pe = '0;
  cfg_target_e cfg_target = CFG_BITMASK;
  logic [ADDR_W-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_data = '0;
  logic [NPE-1:0] noc_out_valid, noc_out_ready, noc_in_valid, noc_in_ready, stall, flush;
  pkt_t noc_out_pkt [NPE];
  pkt_t noc_in_pkt [NPE];
  logic [PE_W-1:0] rd_pe = '0;
  logic [ADDR_W-1:0] rd_idx = '0;
  logic [VAL_W-1:0] rd_val;
  int delivered, not_neighbour;

  int checks = 0, failures = 0;
  int n_stall = 0, n_flush = 0, n_relay_pkt = 0, n_leaf_pkt = 0, n_wide = 0, max_edges_cycle = 0;
  int n_end_inactive = 0, n_end_limit = 0, n_algs = 0;
  logic [31:0] edges_q = '0;

  graphwave_top #(
    .PE_ROWS(ROWS), .PE_COLS(COLS), .NUM_VPU(NV),
    .BITMASK_DEPTH(128), .INTER_DEPTH(128), .TOPE_DEPTH(128), .TONOC_DEPTH(256),
    .FIFO_DEPTH(2)
  ) dut (.*);

  noc_model #(.NUM_PE(NPE), .COLS(COLS), .LAT(2)) u_noc (
    .clk(clk), .rst_n(rst_n),
    .out_valid(noc_out_valid), .out_ready(noc_out_ready), .out_pkt(noc_out_pkt),
    .in_valid(noc_in_valid), .in_ready(noc_in_ready), .in_pkt(noc_in_pkt),
    .delivered(delivered), .not_neighbour(not_neighbour));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // event counters
  always @(posedge clk) if (rst_n) begin
    n_stall <= n_stall + $countones(stall);
    n_flush <= n_flush + $countones(flush);
    for (int p = 0; p < NPE; p++)
      if (noc_in_valid[p] && noc_in_ready[p]) begin
        if (noc_in_pkt[p].msg.route.kind == K_INTER) n_relay_pkt <= n_relay_pkt + 1;
        else n_leaf_pkt <= n_leaf_pkt + 1;
      end
    edges_q <= edges;
    if (busy && edges > edges_q) begin
      if (int'(edges - edges_q) > max_edges_cycle) max_edges_cycle <= int'(edges - edges_q);
      if (edges - edges_q >= 8) n_wide <= n_wide + 1;
    end
  end

  task automatic load(graph_mapper m);
    foreach (m.ops[i]) begin
      @(negedge clk);
      cfg_we = 1; cfg_pe = PE_W'(m.ops[i].pe); cfg_target = m.ops[i].tgt;
      cfg_addr = ADDR_W'(m.ops[i].addr); cfg_data = m.ops[i].data[CFG_W-1:0];
    end
    @(negedge clk);
    cfg_we = 0;
    m.ops.delete();
  endtask

  task automatic run_and_check(graph_mapper m, alg_e a, int max_ss, int src, string name);
    m.init_ops(a, src);
    alg = a;
    load(m);
    m.reference(a, pr_alpha, max_ss, src);
    max_supersteps = 16'(max_ss);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    n_algs++;
    checks++;
    if (int'(supersteps) != m.ref_supersteps) begin
      failures++; $display("%s: %0d supersteps, expected %0d", name, supersteps, m.ref_supersteps);
    end
    if (max_ss != 0 && int'(supersteps) == max_ss) n_end_limit++; else n_end_inactive++;
    for (int v = 0; v < m.V; v++) begin
      rd_pe = PE_W'(m.vpe[v]); rd_idx = ADDR_W'(m.vslot[v]);
      @(negedge clk);
      checks++;
      if (rd_val !== m.ref_val[v]) begin
        failures++;
        if (failures < 10) $display("%s: vertex %0d = %h, expected %h", name, v, rd_val, m.ref_val[v]);
      end
    end
    checks++;
    if (in_flight != 0) begin failures++; $display("%s: packets left in the NoC", name); end
    $display("%s: %0d supersteps, %0d cycles, %0d VPU writes (%0d graph edges), %0.2f writes/cycle",
             name, supersteps, cycles, edges, m.ref_edges, real'(edges) / real'(cycles));
  endtask

  initial begin
    graph_mapper m;
    m = new(ROWS, COLS, NV, VPP);
    m.random_graph(NPE * VPP, 3, 5, 20, 2);
    m.map_graph(1);
    $display("graph: %0d vertices, %0d edges; %0d unicast, %0d multicast, %0d inter routes, %0d tree packets, %0d relays",
             m.V, m.dst.size(), m.ucast_routes, m.mcast_routes, m.inter_routes, m.tree_packets, m.relays);
    repeat (3) @(posedge clk);
    rst_n = 1;
    load(m);
    run_and_check(m, ALG_BFS, 0, 0, "BFS");
    run_and_check(m, ALG_CC, 0, 0, "CC");
    run_and_check(m, ALG_PR, 4, 0, "PR");
    checks++;
    if (not_neighbour != 0) begin failures++; $display("%0d packets to non-neighbour PEs", not_neighbour); end
    $display("events: stalls=%0d flushes=%0d relayed_pkts=%0d leaf_pkts=%0d wide_cycles=%0d max_writes_per_cycle=%0d",
             n_stall, n_flush, n_relay_pkt, n_leaf_pkt, n_wide, max_edges_cycle);
    $display("runs: ended_inactive=%0d ended_limit=%0d algorithms=%0d ucast=%0d mcast=%0d",
             n_end_inactive, n_end_limit, n_algs, m.ucast_routes, m.mcast_routes);
    checks++; if (m.ucast_routes == 0)  begin failures++; $display("no unicast route"); end
    checks++; if (m.mcast_routes == 0)  begin failures++; $display("no multicast route"); end
    checks++; if (n_wide == 0)          begin failures++; $display("no wide multicast cycle"); end
    checks++; if (n_relay_pkt == 0)     begin failures++; $display("no relayed packet"); end
    checks++; if (n_leaf_pkt == 0)      begin failures++; $display("no leaf packet"); end
    checks++; if (n_stall == 0)         begin failures++; $display("no arbiter stall"); end
    checks++; if (n_flush == 0)         begin failures++; $display("no relay flush"); end
    checks++; if (n_end_inactive == 0)  begin failures++; $display("no run ended by inactivity"); end
    checks++; if (n_end_limit == 0)     begin failures++; $display("no run ended by the limit"); end
    checks++; if (n_algs != 3)          begin failures++; $display("not all algorithms ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
