// to_noc_addr_gen_tb: self-checking test of the to-NoC address generator.
// Loads a random address table, then starts bursts (random base and count, count 0 included)
// with a random or always-high out_ready. Every emitted packet must carry the next-hop PE and route of the table word at
// base + i with the burst's value, in order; the first message must be valid two cycles after
// the start and, with out_ready held high, the burst must end count cycles after that.
module to_noc_addr_gen_tb;
  import graphwave_pkg::*;
  localparam int D = 32;
  logic clk = 0, rst_n = 0;
  logic start_valid = 0, start_ready, out_valid, out_ready = 0, ld_we = 0, busy;
  logic [ADDR_W-1:0] start_base = '0;
  logic [CNT_W-1:0] start_cnt = '0;
  logic [VAL_W-1:0] start_val = '0;
  pkt_t out_pkt;
  logic [4:0] ld_addr = '0;
  noc_route_t ld_data = '0;
  noc_route_t table_q [D];
  int checks = 0, failures = 0;

  to_noc_addr_gen #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      table_q[i] = '{dest: PE_W'($urandom), route: '{kind: kind_e'($urandom_range(1, 3)), addr: ADDR_W'($urandom)}};
      ld_we = 1; ld_addr = 5'(i); ld_data = table_q[i];
    end
    @(negedge clk); ld_we = 0;
    for (int b = 0; b < 200; b++) begin
      int base, cnt, got, t0, tfirst;
      logic fast;
      base = $urandom_range(D - 1);
      cnt  = (b % 10 == 0) ? 0 : $urandom_range(1, D - base);
      fast = (b % 2 == 0);
      @(negedge clk);
      checks++;
      if (!start_ready) begin failures++; $display("not ready"); end
      start_valid = 1; start_base = ADDR_W'(base); start_cnt = CNT_W'(cnt); start_val = $urandom;
      @(negedge clk);
      start_valid = 0;
      t0 = 0; got = 0; tfirst = -1;
      while (got < cnt) begin
        out_ready = fast ? 1'b1 : 1'($urandom_range(1));
        #1;
        if (out_valid) begin
          if (tfirst < 0) tfirst = t0;
          if (out_ready) begin
            checks++;
            if (out_pkt.dest !== table_q[base + got].dest || out_pkt.msg.route !== table_q[base + got].route || out_pkt.msg.val !== start_val) begin
              failures++; $display("burst %0d item %0d wrong", b, got);
            end
            got++;
          end
        end
        @(negedge clk);
        t0++;
        if (t0 > 500) begin failures++; $display("burst stuck"); break; end
      end
      out_ready = 0;
      if (cnt > 0) begin
        checks++;
        if (tfirst != 1) begin failures++; $display("first output after %0d cycles", tfirst + 1); end
        if (fast) begin
          checks++;
          if (t0 != cnt + 1) begin failures++; $display("burst of %0d took %0d cycles", cnt, t0); end
        end
      end
      checks++;
      if (busy || out_valid) begin failures++; $display("not idle after burst"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
