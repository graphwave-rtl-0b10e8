// vpu_tb: self-checking test of the vertex processing unit.
// Runs the Reduce and Apply rules of the three algorithms against values computed here:
// BFS (min-reduce, val = acc, message = level + 1, activity from change), CC (min-reduce,
// val = min(acc, val)), PageRank (sum-reduce, Q16.16 apply with division by the degree,
// accumulator cleared after apply), the relay mode (collect, send on flush, reset, a message
// arriving in the grant cycle is kept), and a disabled VPU that ignores traffic.
module vpu_tb;
  import graphwave_pkg::*;
  logic clk = 0, rst_n = 0;
  alg_e alg = ALG_BFS;
  logic [VAL_W-1:0] pr_alpha = 32'd9830;   // 0.15
  logic cfg_we = 0, init_we = 0, msg_we = 0, start_prop = 0, apply = 0, flush = 0, grant = 0;
  vpu_cfg_t cfg_in = '0;
  vpu_init_t init_in = '0;
  logic [VAL_W-1:0] msg_val = '0;
  logic req, is_relay, active;
  msg_t out_msg;
  logic [VAL_W-1:0] val;
  int checks = 0, failures = 0;

  vpu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick(); @(posedge clk); #1; endtask
  task automatic configure(logic en, logic rl, kind_e k, int a, int deg);
    cfg_in = '{enable: en, relay: rl, outbound: '{kind: k, addr: ADDR_W'(a)}, degree: DEG_W'(deg)};
    cfg_we = 1; tick(); cfg_we = 0;
  endtask
  task automatic init(logic act, logic [VAL_W-1:0] v);
    init_in = '{active: act, val: v}; init_we = 1; tick(); init_we = 0;
  endtask
  task automatic send(logic [VAL_W-1:0] v);
    msg_val = v; msg_we = 1; tick(); msg_we = 0;
  endtask
  task automatic pulse_start(); start_prop = 1; tick(); start_prop = 0; endtask
  task automatic pulse_apply(); apply = 1; tick(); apply = 0; endtask
  task automatic pulse_flush(); flush = 1; tick(); flush = 0; endtask
  task automatic check(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1; tick();

    // ---- BFS ----
    alg = ALG_BFS;
    configure(1, 0, K_MCAST, 5, 3);
    init(0, VAL_INF);
    send(7); send(3); send(9);
    pulse_start();
    check("bfs inactive no req", req, 0);
    pulse_apply();
    check("bfs val", val, 3);
    check("bfs active", active, 1);
    pulse_start();
    check("bfs req", req, 1);
    check("bfs msg val", out_msg.val, 4);
    check("bfs msg kind", out_msg.route.kind, K_MCAST);
    check("bfs msg addr", out_msg.route.addr, 5);
    grant = req; tick(); grant = 0;
    check("bfs req cleared", req, 0);
    pulse_apply();
    check("bfs stable val", val, 3);
    check("bfs inactive", active, 0);

    // ---- CC ----
    alg = ALG_CC;
    configure(1, 0, K_UCAST, 2, 1);
    init(1, 10);
    pulse_start();
    check("cc req", req, 1);
    check("cc msg val", out_msg.val, 10);
    send(12); send(4);
    grant = req; tick(); grant = 0;
    pulse_apply();
    check("cc val", val, 4);
    check("cc active", active, 1);
    pulse_apply();
    check("cc inactive", active, 0);

    // ---- PageRank ----
    alg = ALG_PR;
    configure(1, 0, K_INTER, 9, 4);
    init(1, 32'h0000_4000);
    begin
      longint unsigned sum, exp;
      sum = 0;
      for (int i = 0; i < 6; i++) begin
        logic [31:0] m;
        m = 32'($urandom_range(32'h0002_0000));
        sum += m;
        send(m);
      end
      sum = sum & 64'hffff_ffff;
      exp = ((64'(pr_alpha) + ((((64'h1_0000 - 64'(pr_alpha)) * sum)) >> 16)) & 64'hffff_ffff) / 4;
      pulse_start();
      check("pr req", req, 1);
      check("pr msg is old val", out_msg.val, 32'h0000_4000);
      grant = req; tick(); grant = 0;
      pulse_apply();
      check("pr val", val, exp);
      pulse_apply();
      check("pr acc cleared", val, 64'(pr_alpha) / 4);
      check("pr active", active, 1);
    end

    // ---- relay (in-flight reduction) ----
    configure(1, 1, K_INTER, 2, 0);
    init(0, 0);
    check("relay flag", is_relay, 1);
    pulse_start();
    check("relay no req on start", req, 0);
    send(100); send(200);
    pulse_flush();
    check("relay req", req, 1);
    check("relay msg", out_msg.val, 300);
    msg_val = 55; msg_we = 1; grant = req; tick(); msg_we = 0; grant = 0;
    check("relay sent", req, 0);
    pulse_flush();
    check("relay keeps msg from grant cycle", out_msg.val, 55);
    grant = req; tick(); grant = 0;
    pulse_flush();
    check("relay empty no req", req, 0);
    pulse_apply();
    check("relay does not apply", val, 0);

    // ---- disabled VPU ----
    alg = ALG_CC;
    configure(0, 0, K_UCAST, 1, 1);
    init(1, 50);
    send(3);
    pulse_start();
    check("disabled no req", req, 0);
    pulse_apply();
    check("disabled val kept", val, 50);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
