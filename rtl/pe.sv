// pe: Processing Element, NUM_VPU vertex processing units with the tables that route their
// messages.
//
// Message flow. When a superstep starts (start_prop) every active vertex raises a request; the
// arbiter grants one VPU per cycle and puts its message into one of two FIFOs by type:
// unicast/multicast messages into the local-intra FIFO, inter-table messages into the
// local-inter FIFO. The intra-PE datapath takes messages from the local-intra FIFO, from the
// to-PE FIFO (filled by the inter-PE datapath) and from packets of the NoC-in FIFO that need
// no relaying, and writes each into up to NUM_VPU VPUs at once through the bit-masking table or
// the unicast unit. The inter-PE datapath takes inter-table messages from the local-inter FIFO
// and from the NoC-in FIFO and produces to-PE messages and to-NoC packets; the latter leave
// through the NoC-out FIFO. The five FIFOs are the PE's message buffers.
//
// In-flight reduction. A VPU configured as relay collects messages from the PE's own vertices.
// Once every ordinary vertex of the PE has sent and the local paths are empty, the PE pulses
// flush once, and each relay that received something sends one combined message.
//
// Control: start_prop starts propagation, apply ends the superstep in all VPUs (one cycle).
// idle is high when nothing is left to send or in flight inside the PE; the superstep
// controller combines it with the NoC packet counts (pkt_sent, pkt_recv). Load bus: with cfg_we
// high, cfg_target selects a table or the VPU configuration/initial value and cfg_addr the
// entry or the VPU; loads happen only between runs. rd_idx selects a VPU whose value appears
// on rd_val one cycle later.
// Follows the GraphWave architecture: the two datapaths, the tables, the FIFO count and the use of unmapped
// VPUs for in-flight reduction. The FIFO depth, the load bus, the steering of NoC packets by
// route type and the flush rule are this design's own.
module pe
  import graphwave_pkg::*;
#(
  parameter int NUM_VPU       = 256,
  parameter int BITMASK_DEPTH = 8192,
  parameter int INTER_DEPTH   = 8192,
  parameter int TOPE_DEPTH    = 8192,
  parameter int TONOC_DEPTH   = 16384,
  parameter int FIFO_DEPTH    = 8,
  parameter int CFG_W         = (NUM_VPU > 64) ? NUM_VPU : 64,
  parameter int PE_ID         = 0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  alg_e               alg,
  input  logic [VAL_W-1:0]   pr_alpha,
  // load bus
  input  logic               cfg_we,
  input  cfg_target_e        cfg_target,
  input  logic [ADDR_W-1:0]  cfg_addr,
  input  logic [CFG_W-1:0]   cfg_data,
  // superstep control
  input  logic               start_prop,
  input  logic               apply,
  output logic               idle,
  output logic               any_active,
  // NoC injection / ejection
  output logic               noc_out_valid,
  input  logic               noc_out_ready,
  output pkt_t               noc_out_pkt,
  input  logic               noc_in_valid,
  output logic               noc_in_ready,
  input  pkt_t               noc_in_pkt,
  // statistics
  output logic               pkt_sent,
  output logic               pkt_recv,
  output logic [$clog2(NUM_VPU+1)-1:0] edges,
  output logic               stall,
  output logic               flush_evt,
  // readback
  input  logic [ADDR_W-1:0]  rd_idx,
  output logic [VAL_W-1:0]   rd_val
);
  localparam int BAW = (BITMASK_DEPTH > 1) ? $clog2(BITMASK_DEPTH) : 1;
  localparam int MW  = $bits(msg_t);
  localparam int PW  = $bits(pkt_t);

  // ---------------- VPUs ----------------
  logic [NUM_VPU-1:0] req, grant, relay, act, vpu_we;
  msg_t               vmsg [NUM_VPU];
  logic [VAL_W-1:0]   vval [NUM_VPU];
  logic [VAL_W-1:0]   vpu_val;
  logic               flush;

  for (genvar g = 0; g < NUM_VPU; g++) begin : g_vpu
    vpu u_vpu (
      .clk       (clk),
      .rst_n     (rst_n),
      .alg       (alg),
      .pr_alpha  (pr_alpha),
      .cfg_we    (cfg_we && cfg_target == CFG_VPU_CFG  && cfg_addr == ADDR_W'(g)),
      .cfg_in    (vpu_cfg_t'(cfg_data[$bits(vpu_cfg_t)-1:0])),
      .init_we   (cfg_we && cfg_target == CFG_VPU_INIT && cfg_addr == ADDR_W'(g)),
      .init_in   (vpu_init_t'(cfg_data[$bits(vpu_init_t)-1:0])),
      .msg_we    (vpu_we[g]),
      .msg_val   (vpu_val),
      .start_prop(start_prop),
      .apply     (apply),
      .flush     (flush),
      .req       (req[g]),
      .grant     (grant[g]),
      .out_msg   (vmsg[g]),
      .is_relay  (relay[g]),
      .val       (vval[g]),
      .active    (act[g])
    );
  end

  // ---------------- arbiter and local FIFOs ----------------
  logic arb_intra_v, arb_intra_r, arb_inter_v, arb_inter_r;
  msg_t arb_msg;

  vpu_arbiter #(.NUM_VPU(NUM_VPU)) u_arb (
    .clk        (clk),
    .rst_n      (rst_n),
    .req        (req),
    .msgs       (vmsg),
    .grant      (grant),
    .intra_valid(arb_intra_v),
    .intra_ready(arb_intra_r),
    .inter_valid(arb_inter_v),
    .inter_ready(arb_inter_r),
    .out_msg    (arb_msg),
    .stall      (stall)
  );

  logic li_v, li_r, le_v, le_r, tp_v, tp_r, tpf_v, tpf_r;
  logic ni_v, ni_r, no_v, no_r;
  logic li_e, le_e, tp_e, ni_e, no_e;
  msg_t li_m, le_m, tp_m, tpf_m;
  pkt_t ni_p, no_p, gen_p;
  logic gen_p_v, gen_p_r;

  sync_fifo #(.WIDTH(MW), .DEPTH(FIFO_DEPTH)) u_fifo_local_intra (
    .clk(clk), .rst_n(rst_n),
    .in_valid(arb_intra_v), .in_ready(arb_intra_r), .in_data(arb_msg),
    .out_valid(li_v), .out_ready(li_r), .out_data(li_m), .empty(li_e));

  sync_fifo #(.WIDTH(MW), .DEPTH(FIFO_DEPTH)) u_fifo_local_inter (
    .clk(clk), .rst_n(rst_n),
    .in_valid(arb_inter_v), .in_ready(arb_inter_r), .in_data(arb_msg),
    .out_valid(le_v), .out_ready(le_r), .out_data(le_m), .empty(le_e));

  sync_fifo #(.WIDTH(MW), .DEPTH(FIFO_DEPTH)) u_fifo_to_pe (
    .clk(clk), .rst_n(rst_n),
    .in_valid(tp_v), .in_ready(tp_r), .in_data(tp_m),
    .out_valid(tpf_v), .out_ready(tpf_r), .out_data(tpf_m), .empty(tp_e));

  sync_fifo #(.WIDTH(PW), .DEPTH(FIFO_DEPTH)) u_fifo_noc_in (
    .clk(clk), .rst_n(rst_n),
    .in_valid(noc_in_valid), .in_ready(noc_in_ready), .in_data(noc_in_pkt),
    .out_valid(ni_v), .out_ready(ni_r), .out_data(ni_p), .empty(ni_e));

  sync_fifo #(.WIDTH(PW), .DEPTH(FIFO_DEPTH)) u_fifo_noc_out (
    .clk(clk), .rst_n(rst_n),
    .in_valid(gen_p_v), .in_ready(gen_p_r), .in_data(gen_p),
    .out_valid(no_v), .out_ready(no_r), .out_data(no_p), .empty(no_e));

  assign noc_out_valid = no_v;
  assign no_r          = noc_out_ready;
  assign noc_out_pkt   = no_p;
  assign pkt_sent      = no_v && noc_out_ready;
  assign pkt_recv      = noc_in_valid && noc_in_ready;

  // NoC-in steering: relay packets to the inter-PE datapath, the rest to the intra-PE one
  logic ni_is_inter;
  logic [2:0] intra_v, intra_r;
  logic [1:0] inter_v, inter_r;
  msg_t intra_m [3];
  msg_t inter_m [2];
  logic intra_busy, inter_busy;

  assign ni_is_inter = (ni_p.msg.route.kind == K_INTER);

  assign intra_v    = {ni_v && !ni_is_inter, tpf_v, li_v};
  assign intra_m[0] = li_m;
  assign intra_m[1] = tpf_m;
  assign intra_m[2] = ni_p.msg;
  assign li_r       = intra_r[0];
  assign tpf_r      = intra_r[1];

  assign inter_v    = {ni_v && ni_is_inter, le_v};
  assign inter_m[0] = le_m;
  assign inter_m[1] = ni_p.msg;
  assign le_r       = inter_r[0];
  assign ni_r       = ni_is_inter ? inter_r[1] : intra_r[2];

  // ---------------- datapaths ----------------
  intra_pe_datapath #(.NUM_VPU(NUM_VPU), .DEPTH(BITMASK_DEPTH)) u_intra (
    .clk      (clk),
    .rst_n    (rst_n),
    .src_valid(intra_v),
    .src_ready(intra_r),
    .src_msg  (intra_m),
    .ld_we    (cfg_we && cfg_target == CFG_BITMASK),
    .ld_addr  (BAW'(cfg_addr)),
    .ld_mask  (cfg_data[NUM_VPU-1:0]),
    .vpu_we   (vpu_we),
    .vpu_val  (vpu_val),
    .edges    (edges),
    .busy     (intra_busy)
  );

  inter_pe_datapath #(.INTER_DEPTH(INTER_DEPTH), .TOPE_DEPTH(TOPE_DEPTH),
                      .TONOC_DEPTH(TONOC_DEPTH)) u_inter (
    .clk        (clk),
    .rst_n      (rst_n),
    .src_valid  (inter_v),
    .src_ready  (inter_r),
    .src_msg    (inter_m),
    .pe_valid   (tp_v),
    .pe_ready   (tp_r),
    .pe_msg     (tp_m),
    .noc_valid  (gen_p_v),
    .noc_ready  (gen_p_r),
    .noc_pkt    (gen_p),
    .ld_inter_we(cfg_we && cfg_target == CFG_INTER),
    .ld_tope_we (cfg_we && cfg_target == CFG_TOPE),
    .ld_tonoc_we(cfg_we && cfg_target == CFG_TONOC),
    .ld_addr    (cfg_addr),
    .ld_inter   (inter_entry_t'(cfg_data[$bits(inter_entry_t)-1:0])),
    .ld_tope    (route_t'(cfg_data[$bits(route_t)-1:0])),
    .ld_tonoc   (noc_route_t'(cfg_data[$bits(noc_route_t)-1:0])),
    .busy       (inter_busy)
  );

  // ---------------- superstep bookkeeping ----------------
  logic in_prop, flushed;
  logic paths_empty;

  assign paths_empty = li_e && le_e && tp_e && ni_e && no_e && !intra_busy && !inter_busy;
  assign flush       = in_prop && !flushed && !(|(req & ~relay)) && paths_empty;
  assign flush_evt   = flush && (|relay);
  assign idle        = !(|req) && paths_empty && !(in_prop && !flushed);
  assign any_active  = |(act & ~relay);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_prop <= 1'b0;
      flushed <= 1'b0;
    end else if (start_prop) begin
      in_prop <= 1'b1;
      flushed <= 1'b0;
    end else if (apply) begin
      in_prop <= 1'b0;
    end else if (flush) begin
      flushed <= 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rd_val <= '0;
    else        rd_val <= (int'(rd_idx) < NUM_VPU) ? vval[rd_idx[$clog2(NUM_VPU)-1:0]] : '0;
  end

  assert property (@(posedge clk) disable iff (!rst_n) noc_in_valid |-> noc_in_pkt.dest == PE_W'(PE_ID));
endmodule
