// sram_sp_tb: self-checking test of the single-port SRAM.
// Writes random words to random addresses, keeping a reference copy, then reads addresses back
// and checks each word one cycle after the read (the read latency), and that rdata holds its
// value while the port is disabled.
module sram_sp_tb;
  localparam int W = 40, D = 64, AW = 6;
  logic clk = 0, en = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] ref_mem [D];
  bit           ref_ok [D];
  int checks = 0, failures = 0;

  sram_sp #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < D; i++) ref_ok[i] = 0;
    // fill every word once so all reads are defined
    for (int i = 0; i < D; i++) begin
      @(negedge clk); en = 1; we = 1; addr = AW'(i); wdata = {$urandom, $urandom};
      ref_mem[i] = wdata; ref_ok[i] = 1;
    end
    for (int n = 0; n < 400; n++) begin
      @(negedge clk);
      en = 1; addr = AW'($urandom_range(D-1));
      we = ($urandom_range(2) == 0);
      wdata = {$urandom, $urandom};
      if (we) ref_mem[addr] = wdata;
      else begin
        logic [W-1:0] exp;
        exp = ref_mem[addr];
        @(negedge clk); en = 0; we = 0;
        checks++;
        if (rdata !== exp) begin failures++; $display("read %0d got %h exp %h", addr, rdata, exp); end
        @(negedge clk);
        checks++;
        if (rdata !== exp) begin failures++; $display("rdata not held"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
