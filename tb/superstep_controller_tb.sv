// superstep_controller_tb: self-checking test of the superstep controller with 4 PEs.
// A small model of the PEs stays busy for a random number of cycles after each start_prop and
// injects packets that arrive some cycles later, so the NoC is the only thing not yet quiet.
// The test checks that apply comes only when every PE has been idle and no packet has been in
// flight for two cycles, exactly two cycles after the array became quiet, that a run stops
// when no PE reports active vertices and at max_supersteps, and the cycle, edge and superstep
// counts.
module superstep_controller_tb;
  localparam int NPE = 4, EW = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] max_supersteps = '0;
  logic [NPE-1:0] pe_idle = '1, pe_active = '0, pkt_sent = '0, pkt_recv = '0;
  logic [EW-1:0] pe_edges [NPE];
  logic start_prop, apply, busy, done;
  logic [15:0] supersteps;
  logic [31:0] cycles, edges, in_flight;
  int checks = 0, failures = 0;
  int busy_left [NPE];
  int arrive [$];
  int cyc = 0, quiet_since = -1, total_edges = 0, applies = 0, run_cycles = 0;
  int active_supersteps = 3;

  superstep_controller #(.NUM_PE(NPE), .EW(EW), .CW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // PE and NoC model, driven at the negative edge
  always @(negedge clk) begin
    bit quiet;
    cyc++;
    pkt_sent = '0; pkt_recv = '0;
    for (int p = 0; p < NPE; p++) begin
      pe_edges[p] = '0;
      if (busy_left[p] > 0) begin
        busy_left[p]--;
        pe_edges[p] = EW'($urandom_range(3));
        if ($urandom_range(3) == 0) begin
          pkt_sent[p] = 1;
          arrive.push_back(cyc + 5 + $urandom_range(10));
        end
      end
    end
    for (int i = 0; i < arrive.size(); i++)
      if (arrive[i] <= cyc) begin
        pkt_recv[$urandom_range(NPE - 1)] = 1;  // at most one per cycle here
        arrive.delete(i);
        break;
      end
    for (int p = 0; p < NPE; p++) pe_idle[p] = (busy_left[p] == 0) && !pkt_recv[p];
    if (busy) begin
      run_cycles++;
      for (int p = 0; p < NPE; p++) total_edges += int'(pe_edges[p]);
    end
  end

  // observe the controller at the positive edge
  always @(posedge clk) if (rst_n) begin
    bit q;
    q = (&pe_idle) && (in_flight == 0) && !(|pkt_sent);
    if (start_prop) begin
      for (int p = 0; p < NPE; p++) busy_left[p] = $urandom_range(5, 40);
      quiet_since = -1;
    end
    if (apply) begin
      applies++;
      checks++;
      if (quiet_since < 0 || cyc - quiet_since != 2) begin
        failures++; $display("apply at %0d, quiet since %0d", cyc, quiet_since);
      end
      checks++;
      if (arrive.size() != 0) begin failures++; $display("apply with packets in flight"); end
      if (applies >= active_supersteps) pe_active = '0;
    end
    if (q && quiet_since < 0 && busy && !start_prop && !apply) quiet_since = cyc;
    if (!q) quiet_since = -1;
  end

  task automatic run(int max_ss, int act_ss, int exp_ss);
    applies = 0; active_supersteps = act_ss; pe_active = '1;
    total_edges = 0; run_cycles = 0;
    max_supersteps = 16'(max_ss);
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    @(negedge clk);
    checks++;
    if (int'(supersteps) != exp_ss) begin failures++; $display("supersteps %0d exp %0d", supersteps, exp_ss); end
    checks++;
    if (int'(edges) != total_edges) begin failures++; $display("edges %0d exp %0d", edges, total_edges); end
    checks++;
    if (int'(cycles) != run_cycles) begin failures++; $display("cycles %0d exp %0d", cycles, run_cycles); end
  endtask

  initial begin
    for (int p = 0; p < NPE; p++) begin busy_left[p] = 0; pe_edges[p] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0, 3, 3);     // stops when nothing is active
    run(2, 5, 2);     // stops at the superstep limit
    run(0, 1, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
