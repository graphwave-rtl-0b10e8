// graphwave_top: the GraphWave accelerator, a PE_ROWS x PE_COLS array of processing elements
// (6 x 7 = 42 PEs of 256 vertex processing units, 10,752 vertices) run by one superstep
// controller.
//
// Every vertex of the input graph is mapped to its own VPU, and every edge is encoded in the
// routing tables of the PEs: a vertex sends one message per superstep and the tables multicast
// it, within its PE through the bit-masking table and across PEs hop by hop through the inter
// tables. The network-on-chip that joins the PEs is not part of this module: each PE's
// injection port (noc_out_*) and ejection port (noc_in_*) are brought out, indexed by PE
// number (row * PE_COLS + column). A packet carries its destination PE number in pkt_t.dest;
// the mapper only ever addresses neighbouring PEs, so any mesh NoC that delivers packets to
// their destination will do.
//
// Use: with the controller idle, write the tables and the vertices of each PE over the load bus
// (cfg_we, cfg_pe, cfg_target, cfg_addr, cfg_data; one write per cycle), set alg, pr_alpha and
// max_supersteps, and pulse start. done rises when the run has ended; rd_pe/rd_idx then read
// a vertex value (rd_val one cycle later). cycles, edges and supersteps give the run's
// statistics (edges / cycles is the throughput in traversed edges per cycle), in_flight the
// packets inside the NoC; stall and flush
// show per PE when the VPU arbiter waits for a full FIFO and when relays are flushed.
// The array size and the VPUs per PE follow the GraphWave architecture; the port set is this design's own.
module graphwave_top
  import graphwave_pkg::*;
#(
  parameter int PE_ROWS       = 6,
  parameter int PE_COLS       = 7,
  parameter int NUM_VPU       = 256,
  parameter int BITMASK_DEPTH = 8192,
  parameter int INTER_DEPTH   = 8192,
  parameter int TOPE_DEPTH    = 8192,
  parameter int TONOC_DEPTH   = 16384,
  parameter int FIFO_DEPTH    = 8,
  parameter int NUM_PE        = PE_ROWS * PE_COLS,
  parameter int CFG_W         = (NUM_VPU > 64) ? NUM_VPU : 64,
  parameter int EW            = $clog2(NUM_VPU + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // run control
  input  alg_e              alg,
  input  logic [VAL_W-1:0]  pr_alpha,
  input  logic [15:0]       max_supersteps,
  input  logic              start,
  output logic              busy,
  output logic              done,
  output logic [15:0]       supersteps,
  output logic [31:0]       cycles,
  output logic [31:0]       edges,
  output logic [31:0]       in_flight,
  // load bus
  input  logic              cfg_we,
  input  logic [PE_W-1:0]   cfg_pe,
  input  cfg_target_e       cfg_target,
  input  logic [ADDR_W-1:0] cfg_addr,
  input  logic [CFG_W-1:0]  cfg_data,
  // NoC ports, one per PE
  output logic [NUM_PE-1:0] noc_out_valid,
  input  logic [NUM_PE-1:0] noc_out_ready,
  output pkt_t              noc_out_pkt [NUM_PE],
  input  logic [NUM_PE-1:0] noc_in_valid,
  output logic [NUM_PE-1:0] noc_in_ready,
  input  pkt_t              noc_in_pkt [NUM_PE],
  // events
  output logic [NUM_PE-1:0] stall,
  output logic [NUM_PE-1:0] flush,
  // readback
  input  logic [PE_W-1:0]   rd_pe,
  input  logic [ADDR_W-1:0] rd_idx,
  output logic [VAL_W-1:0]  rd_val
);
  logic              start_prop, apply;
  logic [NUM_PE-1:0] pe_idle, pe_active, pkt_sent, pkt_recv;
  logic [EW-1:0]     pe_edges [NUM_PE];
  logic [VAL_W-1:0]  pe_rd [NUM_PE];

  for (genvar p = 0; p < NUM_PE; p++) begin : g_pe
    pe #(
      .NUM_VPU      (NUM_VPU),
      .BITMASK_DEPTH(BITMASK_DEPTH),
      .INTER_DEPTH  (INTER_DEPTH),
      .TOPE_DEPTH   (TOPE_DEPTH),
      .TONOC_DEPTH  (TONOC_DEPTH),
      .FIFO_DEPTH   (FIFO_DEPTH),
      .CFG_W        (CFG_W),
      .PE_ID        (p)
    ) u_pe (
      .clk          (clk),
      .rst_n        (rst_n),
      .alg          (alg),
      .pr_alpha     (pr_alpha),
      .cfg_we       (cfg_we && cfg_pe == PE_W'(p)),
      .cfg_target   (cfg_target),
      .cfg_addr     (cfg_addr),
      .cfg_data     (cfg_data),
      .start_prop   (start_prop),
      .apply        (apply),
      .idle         (pe_idle[p]),
      .any_active   (pe_active[p]),
      .noc_out_valid(noc_out_valid[p]),
      .noc_out_ready(noc_out_ready[p]),
      .noc_out_pkt  (noc_out_pkt[p]),
      .noc_in_valid (noc_in_valid[p]),
      .noc_in_ready (noc_in_ready[p]),
      .noc_in_pkt   (noc_in_pkt[p]),
      .pkt_sent     (pkt_sent[p]),
      .pkt_recv     (pkt_recv[p]),
      .edges        (pe_edges[p]),
      .stall        (stall[p]),
      .flush_evt    (flush[p]),
      .rd_idx       (rd_idx),
      .rd_val       (pe_rd[p])
    );
  end

  superstep_controller #(.NUM_PE(NUM_PE), .EW(EW), .CW(32)) u_ctrl (
    .clk           (clk),
    .rst_n         (rst_n),
    .start         (start),
    .max_supersteps(max_supersteps),
    .pe_idle       (pe_idle),
    .pe_active     (pe_active),
    .pkt_sent      (pkt_sent),
    .pkt_recv      (pkt_recv),
    .pe_edges      (pe_edges),
    .start_prop    (start_prop),
    .apply         (apply),
    .busy          (busy),
    .done          (done),
    .supersteps    (supersteps),
    .cycles        (cycles),
    .edges         (edges),
    .in_flight     (in_flight)
  );

  assign rd_val = (int'(rd_pe) < NUM_PE) ? pe_rd[$clog2(NUM_PE)'(rd_pe)] : '0;

  // the load bus is only used between runs
  assert property (@(posedge clk) disable iff (!rst_n) cfg_we |-> !busy);
endmodule
