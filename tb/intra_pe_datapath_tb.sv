// intra_pe_datapath_tb: self-checking test of the intra-PE datapath for a 16-VPU PE.
// Loads random masks into the bit-masking table, then offers random unicast and multicast
// messages on the three sources with random valid patterns. Each accepted message must appear,
// exactly one cycle after acceptance, as vpu_we equal to the table mask (multicast) or the
// one-hot VPU (unicast) with vpu_val equal to the message value; edges must equal the number of
// write enables; the sources must be served round-robin so none starves; a 16-way multicast
// must reach all 16 VPUs in one cycle.
module intra_pe_datapath_tb;
  import graphwave_pkg::*;
  localparam int N = 16, D = 32;
  logic clk = 0, rst_n = 0;
  logic [2:0] src_valid = '0, src_ready;
  msg_t src_msg [3];
  logic ld_we = 0;
  logic [4:0] ld_addr = '0;
  logic [N-1:0] ld_mask = '0;
  logic [N-1:0] vpu_we;
  logic [VAL_W-1:0] vpu_val;
  logic [$clog2(N+1)-1:0] edges;
  logic busy;
  logic [N-1:0] masks [D];
  int checks = 0, failures = 0, accepted = 0, full_cast = 0;
  int per_src [3];
  logic exp_v = 0;
  logic [2:0] taken = '0;
  logic [N-1:0] exp_we;
  logic [VAL_W-1:0] exp_val;

  intra_pe_datapath #(.NUM_VPU(N), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic msg_t rand_msg();
    msg_t m;
    m.route.kind = ($urandom_range(1) == 0) ? K_UCAST : K_MCAST;
    m.route.addr = (m.route.kind == K_UCAST) ? ADDR_W'($urandom_range(N-1)) : ADDR_W'($urandom_range(D-1));
    m.val = $urandom;
    return m;
  endfunction

  initial begin
    per_src = '{0, 0, 0};
    for (int s = 0; s < 3; s++) src_msg[s] = rand_msg();
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      masks[i] = (i == 0) ? '1 : N'($urandom);
      ld_we = 1; ld_addr = 5'(i); ld_mask = masks[i];
    end
    @(negedge clk); ld_we = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // output check for the message accepted in the previous cycle
      checks++;
      if (exp_v) begin
        if (vpu_we !== exp_we || vpu_val !== exp_val || edges !== $countones(exp_we)) begin
          failures++; $display("out we=%h exp %h val=%h exp %h", vpu_we, exp_we, vpu_val, exp_val);
        end
        if (exp_we == '1) full_cast++;
      end else if (vpu_we !== '0) begin
        failures++; $display("spurious write");
      end
      src_valid = src_valid & ~taken;
      for (int s = 0; s < 3; s++)
        if (!src_valid[s] && $urandom_range(1)) begin src_valid[s] = 1; src_msg[s] = rand_msg(); end
      if (n % 97 == 0) begin src_valid[1] = 1; src_msg[1] = '{route: '{kind: K_MCAST, addr: '0}, val: 32'hface}; end
      #1;
      exp_v = 0;
      checks++;
      if ($countones(src_ready) > 1 || (src_valid != '0 && src_ready == '0) || ((src_ready & ~src_valid) != '0)) begin
        failures++; $display("ready wrong valid=%b ready=%b", src_valid, src_ready);
      end
      for (int s = 0; s < 3; s++)
        if (src_ready[s]) begin
          exp_v = 1; per_src[s]++; accepted++;
          exp_val = src_msg[s].val;
          exp_we = (src_msg[s].route.kind == K_MCAST) ? masks[src_msg[s].route.addr] : N'(1) << src_msg[s].route.addr;
        end
      taken = src_ready;
    end
    checks++;
    if (per_src[0] < 300 || per_src[1] < 300 || per_src[2] < 300) begin failures++; $display("starvation %0d %0d %0d", per_src[0], per_src[1], per_src[2]); end
    checks++;
    if (full_cast == 0) begin failures++; $display("no full multicast"); end
    $display("accepted %0d messages, %0d full multicasts", accepted, full_cast);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
