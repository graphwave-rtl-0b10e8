// unicast_unit_tb: exhaustive test of the unicast decoder for 16 VPUs: every index inside the
// PE gives exactly its own write enable, indices outside the PE and en low give none.
module unicast_unit_tb;
  localparam int N = 16;
  logic en;
  logic [15:0] idx;
  logic [N-1:0] we;
  int checks = 0, failures = 0;

  unicast_unit #(.NUM_VPU(N), .IDX_W(16)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int e = 0; e < 2; e++)
      for (int i = 0; i < 40; i++) begin
        logic [N-1:0] exp;
        en = e[0]; idx = 16'(i);
        exp = (e == 1 && i < N) ? (N'(1) << i) : '0;
        #1;
        checks++;
        if (we !== exp) begin failures++; $display("en=%0d idx=%0d we=%b", en, idx, we); end
      end
    en = 1; idx = 16'hffff; #1;
    checks++;
    if (we !== '0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
