// vpu_arbiter: picks, each cycle, one VPU of the PE that has a message to propagate and
// steers that message by its type.
//
// Requests are served round-robin, starting after the VPU granted last. A message whose route
// is K_INTER goes to the inter-PE datapath output (inter_*), a unicast or multicast message to
// the intra-PE datapath output (intra_*). If the chosen output cannot take the message
// (ready low) nothing is granted that cycle: the arbiter stalls on that VPU until the path
// drains. At most one grant per cycle; grant and the output valid are combinational in the
// requests, the round-robin pointer moves on the clock edge.
// The GraphWave architecture says the VPUs' messages go to the inter-PE datapath, the intra-PE datapath or
// the NoC by message type; the single-grant round-robin scheduler is this design's choice.
module vpu_arbiter
  import graphwave_pkg::*;
#(
  parameter int NUM_VPU = 256
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [NUM_VPU-1:0] req,
  input  msg_t               msgs [NUM_VPU],
  output logic [NUM_VPU-1:0] grant,
  output logic               intra_valid,
  input  logic               intra_ready,
  output logic               inter_valid,
  input  logic               inter_ready,
  output msg_t               out_msg,
  output logic               stall
);
  localparam int IW = (NUM_VPU > 1) ? $clog2(NUM_VPU) : 1;

  logic [IW-1:0] ptr;
  logic [IW-1:0] sel;
  logic          found;
  logic          is_inter;
  logic          ok;

  always_comb begin
    found = 1'b0;
    sel   = '0;
    for (int i = 0; i < NUM_VPU; i++) begin
      int j;
      j = int'(ptr) + i;
      if (j >= NUM_VPU) j = j - NUM_VPU;
      if (!found && req[j]) begin
        found = 1'b1;
        sel   = IW'(j);
      end
    end
  end

  assign out_msg     = msgs[sel];
  assign is_inter    = (out_msg.route.kind == K_INTER);
  assign ok          = found && (is_inter ? inter_ready : intra_ready);
  assign intra_valid = ok && !is_inter;
  assign inter_valid = ok && is_inter;
  assign stall       = found && !ok;

  always_comb begin
    grant = '0;
    grant[sel] = ok;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (ok) ptr <= (int'(sel) == NUM_VPU - 1) ? '0 : sel + 1'b1;
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
