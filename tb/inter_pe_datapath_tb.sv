// inter_pe_datapath_tb: self-checking test of the inter-PE datapath.
// Loads random inter table entries (to-PE and to-NoC bursts of 0..4 words, some entries with
// both) and random address tables, then offers random K_INTER messages on both sources while
// the two outputs see random back-pressure. For each accepted message the expected to-PE
// messages and to-NoC packets are appended to two reference queues; both outputs must match
// them in order, both sources must be served, and the datapath must drain to idle.
module inter_pe_datapath_tb;
  import graphwave_pkg::*;
  localparam int DI = 16, DP = 64, DN = 64;
  logic clk = 0, rst_n = 0;
  logic [1:0] src_valid = '0, src_ready;
  msg_t src_msg [2];
  logic pe_valid, pe_ready = 0, noc_valid, noc_ready = 0, busy;
  msg_t pe_msg;
  pkt_t noc_pkt;
  logic ld_inter_we = 0, ld_tope_we = 0, ld_tonoc_we = 0;
  logic [ADDR_W-1:0] ld_addr = '0;
  inter_entry_t ld_inter = '0;
  route_t ld_tope = '0;
  noc_route_t ld_tonoc = '0;
  inter_entry_t it [DI];
  route_t tp [DP];
  noc_route_t tn [DN];
  msg_t exp_pe [$];
  pkt_t exp_noc [$];
  logic [1:0] taken = '0;
  int checks = 0, failures = 0, served0 = 0, served1 = 0, n_pe = 0, n_noc = 0;

  inter_pe_datapath #(.INTER_DEPTH(DI), .TOPE_DEPTH(DP), .TONOC_DEPTH(DN)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic msg_t rand_msg();
    return '{route: '{kind: K_INTER, addr: ADDR_W'($urandom_range(DI - 1))}, val: $urandom};
  endfunction

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < DP; i++) begin
      @(negedge clk);
      tp[i] = '{kind: kind_e'($urandom_range(1, 2)), addr: ADDR_W'($urandom)};
      tn[i] = '{dest: PE_W'($urandom), route: '{kind: kind_e'($urandom_range(1, 3)), addr: ADDR_W'($urandom)}};
      ld_addr = ADDR_W'(i); ld_tope = tp[i]; ld_tonoc = tn[i];
      ld_tope_we = 1; ld_tonoc_we = 1;
      if (i < DI) begin
        it[i] = '{pe_base: ADDR_W'($urandom_range(DP - 5)), pe_cnt: CNT_W'($urandom_range(4)),
                  noc_base: ADDR_W'($urandom_range(DN - 5)), noc_cnt: CNT_W'($urandom_range(4))};
        if (i == 0) begin it[i].pe_cnt = 3; it[i].noc_cnt = 2; end
        ld_inter = it[i]; ld_inter_we = 1;
      end else ld_inter_we = 0;
    end
    @(negedge clk); ld_tope_we = 0; ld_tonoc_we = 0; ld_inter_we = 0;
    src_msg[0] = rand_msg(); src_msg[1] = rand_msg();
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      src_valid = src_valid & ~taken;
      if (n < 2800)
        for (int s = 0; s < 2; s++)
          if (!src_valid[s] && $urandom_range(1)) begin src_valid[s] = 1; src_msg[s] = rand_msg(); end
      pe_ready  = $urandom_range(3) != 0;
      noc_ready = $urandom_range(3) != 0;
      #1;
      taken = src_ready;
      for (int s = 0; s < 2; s++)
        if (src_ready[s]) begin
          inter_entry_t e;
          e = it[src_msg[s].route.addr];
          if (s == 0) served0++; else served1++;
          for (int k = 0; k < int'(e.pe_cnt); k++)
            exp_pe.push_back('{route: tp[int'(e.pe_base) + k], val: src_msg[s].val});
          for (int k = 0; k < int'(e.noc_cnt); k++)
            exp_noc.push_back('{dest: tn[int'(e.noc_base) + k].dest,
                                msg: '{route: tn[int'(e.noc_base) + k].route, val: src_msg[s].val}});
        end
      if (pe_valid && pe_ready) begin
        checks++; n_pe++;
        if (exp_pe.size() == 0 || pe_msg !== exp_pe[0]) begin failures++; $display("to-PE mismatch"); end
        if (exp_pe.size() != 0) void'(exp_pe.pop_front());
      end
      if (noc_valid && noc_ready) begin
        checks++; n_noc++;
        if (exp_noc.size() == 0 || noc_pkt !== exp_noc[0]) begin failures++; $display("to-NoC mismatch"); end
        if (exp_noc.size() != 0) void'(exp_noc.pop_front());
      end
    end
    checks++;
    if (exp_pe.size() != 0 || exp_noc.size() != 0 || busy) begin
      failures++; $display("not drained: %0d %0d busy=%0d", exp_pe.size(), exp_noc.size(), busy);
    end
    checks++;
    if (served0 < 50 || served1 < 50) begin failures++; $display("source starved %0d %0d", served0, served1); end
    $display("served %0d + %0d messages, %0d to-PE, %0d to-NoC", served0, served1, n_pe, n_noc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
