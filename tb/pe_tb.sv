// pe_tb: self-checking test of one processing element (16 VPUs) driven without the controller.
//
// Part 1 maps a random single-PE graph (unicast and bit-masking routes) and runs BFS and CC
// superstep by superstep: start_prop, wait for idle, apply, compare every vertex with the
// software reference. Part 2 is a directed test of the inter-PE datapath and in-flight
// reduction: two vertices send to a relay VPU, the relay is flushed and sends the combined
// value through an inter table entry that writes a local vertex (to-PE) and emits a packet
// (to-NoC), while a packet from the NoC multicasts to two vertices through the bit-masking
// table.
module pe_tb;
  import graphwave_pkg::*;
  import graphwave_tb_pkg::*;
  localparam int NV = 16, CFG_W = 64;

  logic clk = 0, rst_n = 0;
  alg_e alg = ALG_BFS;
  logic [VAL_W-1:0] pr_alpha = 32'd9830;
  logic cfg_we = 0;
  cfg_target_e cfg_target = CFG_BITMASK;
  logic [ADDR_W-1:0] cfg_addr = '0;
  logic [CFG_W-1:0] cfg_data = '0;
  logic start_prop = 0, apply = 0, idle, any_active;
  logic noc_out_valid, noc_out_ready = 1, noc_in_valid = 0, noc_in_ready;
  pkt_t noc_out_pkt, noc_in_pkt = '0;
  logic pkt_sent, pkt_recv, stall, flush_evt;
  logic [$clog2(NV+1)-1:0] edges;
  logic [ADDR_W-1:0] rd_idx = '0;
  logic [VAL_W-1:0] rd_val;
  int checks = 0, failures = 0, flushes = 0;
  pkt_t got_pkts [$];

  pe #(.NUM_VPU(NV), .BITMASK_DEPTH(64), .INTER_DEPTH(16), .TOPE_DEPTH(16), .TONOC_DEPTH(16),
       .FIFO_DEPTH(2), .CFG_W(CFG_W), .PE_ID(0)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (noc_out_valid && noc_out_ready) got_pkts.push_back(noc_out_pkt);
    if (flush_evt) flushes++;
  end

  task automatic wr(cfg_target_e t, int a, logic [255:0] d);
    @(negedge clk);
    cfg_we = 1; cfg_target = t; cfg_addr = ADDR_W'(a); cfg_data = d[CFG_W-1:0];
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load(graph_mapper m);
    foreach (m.ops[i]) wr(m.ops[i].tgt, m.ops[i].addr, m.ops[i].data);
    m.ops.delete();
  endtask

  task automatic superstep();
    @(negedge clk); start_prop = 1;
    @(negedge clk); start_prop = 0;
    while (!idle) @(negedge clk);
    @(negedge clk);
    @(negedge clk); apply = 1;
    @(negedge clk); apply = 0;
  endtask

  task automatic check_val(int slot, logic [31:0] exp, string what);
    rd_idx = ADDR_W'(slot);
    @(negedge clk);
    @(negedge clk);
    checks++;
    if (rd_val !== exp) begin failures++; $display("%s: vpu %0d = %h exp %h", what, slot, rd_val, exp); end
  endtask

  task automatic run_graph(graph_mapper m, alg_e a);
    int ss;
    alg = a;
    m.init_ops(a, 0);
    load(m);
    m.reference(a, pr_alpha, 0, 0);
    ss = 0;
    do begin
      superstep();
      ss++;
      @(negedge clk);
    end while (any_active && ss < 50);
    checks++;
    if (ss != m.ref_supersteps) begin failures++; $display("supersteps %0d exp %0d", ss, m.ref_supersteps); end
    for (int v = 0; v < m.V; v++) check_val(v, m.ref_val[v], a.name());
  endtask

  initial begin
    graph_mapper m;
    vpu_init_t iv;
    inter_entry_t ie;
    route_t rt;
    noc_route_t nr;
    pkt_t e0, e1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---- part 1: whole graph inside one PE ----
    m = new(1, 1, NV, NV);
    m.random_graph(NV, 2, 3, 6, 1);
    m.map_graph(0);
    load(m);
    run_graph(m, ALG_BFS);
    run_graph(m, ALG_CC);

    // ---- part 2: inter-PE datapath and relay ----
    alg = ALG_CC;
    for (int v = 0; v < NV; v++) begin
      vpu_cfg_t c;
      c = '{enable: 1, relay: 0, outbound: '{kind: K_NONE, addr: '0}, degree: '0};
      if (v == 0 || v == 1) c.outbound = '{kind: K_UCAST, addr: 15};
      if (v == 15) begin c.relay = 1; c.outbound = '{kind: K_INTER, addr: 3}; end
      wr(CFG_VPU_CFG, v, 256'(c));
      iv.active = (v < 2);
      iv.val = (v == 0) ? 32'd5 : (v == 1) ? 32'd3 : 32'd100;
      wr(CFG_VPU_INIT, v, 256'(iv));
    end
    iv = '{active: 0, val: 0};
    wr(CFG_VPU_INIT, 15, 256'(iv));
    ie = '{pe_base: 2, pe_cnt: 1, noc_base: 4, noc_cnt: 2};
    wr(CFG_INTER, 3, 256'(ie));
    rt = '{kind: K_UCAST, addr: 2};
    wr(CFG_TOPE, 2, 256'(rt));
    nr = '{dest: 7, route: '{kind: K_UCAST, addr: 4}};
    wr(CFG_TONOC, 4, 256'(nr));
    nr = '{dest: 1, route: '{kind: K_INTER, addr: 9}};
    wr(CFG_TONOC, 5, 256'(nr));
    wr(CFG_BITMASK, 1, 256'(16'b0000_0000_0110_0000));
    got_pkts.delete();
    flushes = 0;
    @(negedge clk); start_prop = 1;
    @(negedge clk); start_prop = 0;
    noc_in_valid = 1;
    noc_in_pkt = '{dest: 0, msg: '{route: '{kind: K_MCAST, addr: 1}, val: 32'd1}};
    while (!noc_in_ready) @(negedge clk);
    @(negedge clk); noc_in_valid = 0;
    while (!idle) @(negedge clk);
    @(negedge clk); apply = 1;
    @(negedge clk); apply = 0;
    check_val(2, 3, "relay result via to-PE");
    check_val(5, 1, "NoC multicast");
    check_val(6, 1, "NoC multicast");
    check_val(7, 100, "untouched");
    checks++;
    if (flushes != 1) begin failures++; $display("flushes %0d", flushes); end
    checks++;
    if (got_pkts.size() != 2) begin failures++; $display("%0d packets out", got_pkts.size()); end
    else begin
      checks++;
      e0 = '{dest: 7, msg: '{route: '{kind: K_UCAST, addr: 4}, val: 3}};
      e1 = '{dest: 1, msg: '{route: '{kind: K_INTER, addr: 9}, val: 3}};
      if (got_pkts[0] !== e0 || got_pkts[1] !== e1) begin
        failures++; $display("packet contents wrong");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
