// intra_pe_datapath: delivers messages to the VPUs of one PE through the bit-masking table or
// the unicast unit.
//
// Three sources offer messages (valid/ready): the PE's own VPUs (src 0), the to-PE address
// generator (src 1) and packets from the NoC that need no relaying (src 2). One message is
// accepted per cycle, round-robin among the sources. Stage 1 reads the bit-masking table entry
// for a multicast message; stage 2 drives vpu_we from the 256-bit mask (multicast) or from the
// unicast unit's one-hot decode (unicast) and vpu_val with the message value, so every VPU
// whose bit is set reduces the value in the same cycle. Latency: accepted at cycle t, written
// into the VPUs at the edge ending cycle t+1. Throughput: one message, up to NUM_VPU edges, per
// cycle. edges reports the number of write enables asserted this cycle.
// The bit-masking table shares its single port with the load bus (ld_we), which must only be
// used while no message is in flight.
// Follows the GraphWave architecture: bit-masking table with one mask bit per VPU wired to its write enable,
// unicast unit for single destinations. The source arbitration and the two-stage timing are
// this design's own.
module intra_pe_datapath
  import graphwave_pkg::*;
#(
  parameter int NUM_VPU = 256,
  parameter int DEPTH   = 8192,
  parameter int AW      = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [2:0]         src_valid,
  output logic [2:0]         src_ready,
  input  msg_t               src_msg [3],
  // bit-masking table load
  input  logic               ld_we,
  input  logic [AW-1:0]      ld_addr,
  input  logic [NUM_VPU-1:0] ld_mask,
  // to the VPUs
  output logic [NUM_VPU-1:0] vpu_we,
  output logic [VAL_W-1:0]   vpu_val,
  output logic [$clog2(NUM_VPU+1)-1:0] edges,
  output logic               busy
);
  logic [1:0] last;     // source served last
  logic [1:0] pick;
  logic       take;
  msg_t       m_in;

  logic       s1_valid;
  msg_t       s1_msg;
  logic [NUM_VPU-1:0] mask;
  logic [NUM_VPU-1:0] ucast_we;

  // round-robin choice of source
  always_comb begin
    pick = 2'd0;
    take = 1'b0;
    for (int i = 1; i <= 3; i++) begin
      logic [2:0] t;
      logic [1:0] s;
      t = {1'b0, last} + 3'(i);
      s = (t >= 3'd3) ? 2'(t - 3'd3) : 2'(t);
      if (!take && src_valid[s]) begin
        take = 1'b1;
        pick = s;
      end
    end
  end

  always_comb begin
    src_ready = '0;
    src_ready[pick] = take && !ld_we;
  end

  assign m_in = src_msg[pick];

  sram_sp #(.WIDTH(NUM_VPU), .DEPTH(DEPTH)) u_bitmask (
    .clk  (clk),
    .en   (ld_we || (take && m_in.route.kind == K_MCAST)),
    .we   (ld_we),
    .addr (ld_we ? ld_addr : AW'(m_in.route.addr)),
    .wdata(ld_mask),
    .rdata(mask)
  );

  unicast_unit #(.NUM_VPU(NUM_VPU), .IDX_W(ADDR_W)) u_ucast (
    .en  (s1_valid && s1_msg.route.kind == K_UCAST),
    .idx (s1_msg.route.addr),
    .we  (ucast_we)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last     <= 2'd2;
      s1_valid <= 1'b0;
      s1_msg   <= '0;
    end else begin
      s1_valid <= take && !ld_we;
      if (take && !ld_we) begin
        s1_msg <= m_in;
        last   <= pick;
      end
    end
  end

  always_comb begin
    if (!s1_valid)                          vpu_we = '0;
    else if (s1_msg.route.kind == K_MCAST)  vpu_we = mask;
    else                                    vpu_we = ucast_we;
    vpu_val = s1_msg.val;
  end

  always_comb begin
    edges = $bits(edges)'($countones(vpu_we));
  end

  assign busy = s1_valid;

  assert property (@(posedge clk) disable iff (!rst_n)
                   take && !ld_we |-> m_in.route.kind inside {K_UCAST, K_MCAST});
endmodule
