// to_pe_addr_gen: the to-PE address generator of the inter-PE datapath.
//
// Given an inter table entry's to-PE part (base, count) and the message value, it reads count
// consecutive words of its own address table, starting at base, and emits one intra-PE message
// {route, value} per word (each route is a unicast VPU index or a bit-masking table entry).
// Handshakes: start (valid/ready; ready while idle) and out (valid/ready). The address table is
// a single-port SRAM with one cycle of read latency: the first message is valid two cycles after
// start, the following ones one per cycle while out_ready stays high. A start with count 0 is
// accepted and produces nothing. The load port (ld_we) writes the table while idle.
// The GraphWave architecture names this generator and places its address table in single-port SRAM; the
// base/count burst format is this design's own.
module to_pe_addr_gen
  import graphwave_pkg::*;
#(
  parameter int DEPTH = 8192,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_valid,
  output logic              start_ready,
  input  logic [ADDR_W-1:0] start_base,
  input  logic [CNT_W-1:0]  start_cnt,
  input  logic [VAL_W-1:0]  start_val,
  output logic              out_valid,
  input  logic              out_ready,
  output msg_t              out_msg,
  input  logic              ld_we,
  input  logic [AW-1:0]     ld_addr,
  input  route_t            ld_data,
  output logic              busy
);
  typedef enum logic [1:0] {S_IDLE, S_RD, S_OUT} state_e;

  state_e            state;
  logic [ADDR_W-1:0] ptr;
  logic [CNT_W-1:0]  left;
  logic [VAL_W-1:0]  v;
  route_t            rd_route;
  logic              sram_en;
  logic [AW-1:0]     sram_addr;
  logic              more;

  assign start_ready = (state == S_IDLE) && !ld_we;
  assign more        = (left > CNT_W'(1));
  assign out_valid   = (state == S_OUT);
  assign out_msg     = '{route: rd_route, val: v};
  assign busy        = (state != S_IDLE);

  always_comb begin
    sram_en   = 1'b0;
    sram_addr = AW'(ptr);
    if (ld_we) begin
      sram_en   = 1'b1;
      sram_addr = ld_addr;
    end else if (state == S_RD) begin
      sram_en = 1'b1;
    end else if (state == S_OUT && out_ready && more) begin
      sram_en   = 1'b1;
      sram_addr = AW'(ptr + 1'b1);
    end
  end

  sram_sp #(.WIDTH($bits(route_t)), .DEPTH(DEPTH)) u_table (
    .clk  (clk),
    .en   (sram_en),
    .we   (ld_we),
    .addr (sram_addr),
    .wdata(ld_data),
    .rdata(rd_route)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ptr   <= '0;
      left  <= '0;
      v     <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (start_valid && start_ready && start_cnt != '0) begin
            ptr   <= start_base;
            left  <= start_cnt;
            v     <= start_val;
            state <= S_RD;
          end
        S_RD: state <= S_OUT;
        default:
          if (out_ready) begin
            ptr  <= ptr + 1'b1;
            left <= left - 1'b1;
            if (!more) state <= S_IDLE;
          end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) out_valid && !out_ready |=> out_valid && $stable(out_msg));
endmodule
