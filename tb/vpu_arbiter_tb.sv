// vpu_arbiter_tb: self-checking test of the VPU message arbiter with 8 requesters.
// Requests behave like VPUs (raised at random, held until granted), message kinds and the two
// ready inputs are random. A reference round-robin model predicts the granted VPU, the output
// (intra or inter) and stalls; every request must eventually be served.
module vpu_arbiter_tb;
  import graphwave_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] req = '0, grant;
  msg_t msgs [N];
  logic intra_valid, intra_ready = 0, inter_valid, inter_ready = 0, stall;
  msg_t out_msg;
  int checks = 0, failures = 0, stalls = 0, served = 0, raised = 0;
  int ptr = 0, last_sel = 0;
  logic last_ok = 0;

  vpu_arbiter #(.NUM_VPU(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < N; i++) msgs[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int sel;
      logic found, ok, inter;
      @(negedge clk);
      if (last_ok) begin req[last_sel] = 0; ptr = (last_sel + 1) % N; served++; end
      for (int i = 0; i < N; i++)
        if (!req[i] && $urandom_range(3) == 0 && n < 2900) begin
          req[i] = 1; raised++;
          msgs[i] = '{route: '{kind: kind_e'($urandom_range(1, 3)), addr: ADDR_W'($urandom)}, val: $urandom};
        end
      intra_ready = $urandom_range(3) != 0;
      inter_ready = $urandom_range(3) != 0;
      #1;
      found = 0; sel = 0;
      for (int i = 0; i < N; i++) begin
        int j;
        j = (ptr + i) % N;
        if (!found && req[j]) begin found = 1; sel = j; end
      end
      inter = found && msgs[sel].route.kind == K_INTER;
      ok = found && (inter ? inter_ready : intra_ready);
      checks++;
      if (grant !== (ok ? N'(1) << sel : N'(0))) begin failures++; $display("grant %b exp sel %0d ok %0d", grant, sel, ok); end
      checks++;
      if (intra_valid !== (ok && !inter) || inter_valid !== (ok && inter)) begin failures++; $display("steer wrong"); end
      checks++;
      if (stall !== (found && !ok)) begin failures++; $display("stall wrong"); end
      if (ok) begin
        checks++;
        if (out_msg !== msgs[sel]) begin failures++; $display("msg wrong"); end
      end
      if (stall) stalls++;
      last_ok = ok; last_sel = sel;
    end
    @(negedge clk);
    if (last_ok) begin req[last_sel] = 0; served++; end
    checks++;
    if (req != '0 || served != raised) begin failures++; $display("unserved requests"); end
    checks++;
    if (stalls == 0) begin failures++; $display("no stall seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
