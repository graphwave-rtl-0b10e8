// inter_pe_datapath: handles messages that must reach other PEs.
//
// Two sources offer K_INTER messages (valid/ready): the PE's own VPUs (src 0) and packets
// arriving from the NoC that this PE must relay (src 1); they are served round-robin. The
// message's address selects an inter table entry (single-port SRAM, one cycle of latency). The
// entry starts, at the same time, the to-PE address generator (messages for this PE's VPUs,
// towards the intra-PE datapath) and the to-NoC address generator (packets for the next-hop
// PEs). A new message is accepted only when both generators are idle, so one inter message
// occupies the datapath for 2 + max(to-PE count, to-NoC count) cycles or more under
// back-pressure. The three tables are written through the ld_* ports while the datapath is idle.
// Follows the GraphWave architecture: inter table feeding two address generators that work in parallel.
// The entry format and the one-message-at-a-time sequencing are this design's own.
module inter_pe_datapath
  import graphwave_pkg::*;
#(
  parameter int INTER_DEPTH = 8192,
  parameter int TOPE_DEPTH  = 8192,
  parameter int TONOC_DEPTH = 16384
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [1:0]        src_valid,
  output logic [1:0]        src_ready,
  input  msg_t              src_msg [2],
  // towards the intra-PE datapath
  output logic              pe_valid,
  input  logic              pe_ready,
  output msg_t              pe_msg,
  // towards the NoC
  output logic              noc_valid,
  input  logic              noc_ready,
  output pkt_t              noc_pkt,
  // table load
  input  logic              ld_inter_we,
  input  logic              ld_tope_we,
  input  logic              ld_tonoc_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  inter_entry_t      ld_inter,
  input  route_t            ld_tope,
  input  noc_route_t        ld_tonoc,
  output logic              busy
);
  localparam int IAW = (INTER_DEPTH > 1) ? $clog2(INTER_DEPTH) : 1;
  localparam int PAW = (TOPE_DEPTH > 1) ? $clog2(TOPE_DEPTH) : 1;
  localparam int NAW = (TONOC_DEPTH > 1) ? $clog2(TONOC_DEPTH) : 1;

  logic             last;
  logic             pick;
  logic             take;
  logic             pe_idle, noc_idle, pe_busy, noc_busy;
  logic             s1_valid;
  logic [VAL_W-1:0] s1_val;
  inter_entry_t     entry;
  msg_t             m_in;

  always_comb begin
    if (src_valid[!last])      pick = !last;
    else                       pick = last;
    take = src_valid[pick] && pe_idle && noc_idle && !s1_valid && !ld_inter_we;
    src_ready = '0;
    src_ready[pick] = take;
  end

  assign m_in = src_msg[pick];

  sram_sp #(.WIDTH($bits(inter_entry_t)), .DEPTH(INTER_DEPTH)) u_inter (
    .clk  (clk),
    .en   (ld_inter_we || take),
    .we   (ld_inter_we),
    .addr (ld_inter_we ? IAW'(ld_addr) : IAW'(m_in.route.addr)),
    .wdata(ld_inter),
    .rdata(entry)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      last     <= 1'b1;
      s1_valid <= 1'b0;
      s1_val   <= '0;
    end else begin
      s1_valid <= take;
      if (take) begin
        s1_val <= m_in.val;
        last   <= pick;
      end
    end
  end

  to_pe_addr_gen #(.DEPTH(TOPE_DEPTH)) u_tope (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_valid(s1_valid),
    .start_ready(pe_idle),
    .start_base (entry.pe_base),
    .start_cnt  (entry.pe_cnt),
    .start_val  (s1_val),
    .out_valid  (pe_valid),
    .out_ready  (pe_ready),
    .out_msg    (pe_msg),
    .ld_we      (ld_tope_we),
    .ld_addr    (PAW'(ld_addr)),
    .ld_data    (ld_tope),
    .busy       (pe_busy)
  );

  to_noc_addr_gen #(.DEPTH(TONOC_DEPTH)) u_tonoc (
    .clk        (clk),
    .rst_n      (rst_n),
    .start_valid(s1_valid),
    .start_ready(noc_idle),
    .start_base (entry.noc_base),
    .start_cnt  (entry.noc_cnt),
    .start_val  (s1_val),
    .out_valid  (noc_valid),
    .out_ready  (noc_ready),
    .out_pkt    (noc_pkt),
    .ld_we      (ld_tonoc_we),
    .ld_addr    (NAW'(ld_addr)),
    .ld_data    (ld_tonoc),
    .busy       (noc_busy)
  );

  assign busy = s1_valid || pe_busy || noc_busy;

  assert property (@(posedge clk) disable iff (!rst_n) s1_valid |-> pe_idle && noc_idle);
endmodule
