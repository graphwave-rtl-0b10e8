// sync_fifo_tb: self-checking test of the FIFO against a queue model.
// Random pushes and pops (with bursts that fill and drain it) check data order, that in_ready
// falls exactly when DEPTH words are stored, and that empty/out_valid follow the occupancy.
module sync_fifo_tb;
  localparam int W = 16, D = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0, empty;
  logic [W-1:0] in_data = '0, out_data;
  logic [W-1:0] q [$];
  int checks = 0, failures = 0, fulls = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int phase;
      phase = (n / 200) % 3;   // 0: fill-biased, 1: drain-biased, 2: balanced
      @(negedge clk);
      in_valid  = (phase == 0) ? ($urandom_range(3) != 0) : (phase == 1) ? ($urandom_range(3) == 0) : $urandom_range(1);
      out_ready = (phase == 1) ? ($urandom_range(3) != 0) : (phase == 0) ? ($urandom_range(3) == 0) : $urandom_range(1);
      in_data   = W'($urandom);
      // checks against the model, before the edge
      checks++;
      if (in_ready !== (q.size() < D)) begin failures++; $display("in_ready wrong size=%0d", q.size()); end
      checks++;
      if (empty !== (q.size() == 0) || out_valid !== (q.size() != 0)) begin failures++; $display("empty wrong"); end
      if (q.size() != 0) begin
        checks++;
        if (out_data !== q[0]) begin failures++; $display("data %h exp %h", out_data, q[0]); end
      end
      if (q.size() == D) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(q.pop_front());
      if (in_valid && in_ready) q.push_back(in_data);
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
