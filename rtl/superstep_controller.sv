// superstep_controller: the global control logic that steps the PEs through the supersteps of
// vertex-centric processing.
//
// A superstep is a propagate/reduce phase followed by an apply phase. On start the controller
// pulses start_prop to every PE. It then waits until the whole array is quiescent: every PE
// reports idle and no packet is inside the NoC, which it knows by counting packets injected
// (pkt_sent) against packets ejected (pkt_recv) across all PEs. The condition must hold for two
// consecutive cycles. It then pulses apply, and one cycle later reads the active flags: the run
// ends when no vertex is active or when max_supersteps supersteps have been done (0: no
// limit), otherwise the next superstep starts. done stays high from the end of a run until the
// next start. cycles counts the cycles of the run, edges the VPU writes (traversed edges),
// supersteps the completed supersteps.
// Follows the GraphWave architecture: the barrier between supersteps (all PEs must finish before the next
// superstep) and the loop while any vertex is active. The packet-count quiescence test and the
// counters are this design's own.
module superstep_controller #(
  parameter int NUM_PE = 42,
  parameter int EW     = 9,     // width of one PE's per-cycle edge count
  parameter int CW     = 32     // counter width
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [15:0]       max_supersteps,
  input  logic [NUM_PE-1:0] pe_idle,
  input  logic [NUM_PE-1:0] pe_active,
  input  logic [NUM_PE-1:0] pkt_sent,
  input  logic [NUM_PE-1:0] pkt_recv,
  input  logic [EW-1:0]     pe_edges [NUM_PE],
  output logic              start_prop,
  output logic              apply,
  output logic              busy,
  output logic              done,
  output logic [15:0]       supersteps,
  output logic [CW-1:0]     cycles,
  output logic [CW-1:0]     edges,
  output logic [CW-1:0]     in_flight
);
  typedef enum logic [2:0] {S_IDLE, S_START, S_RUN, S_APPLY, S_CHECK} state_e;

  state_e        state;
  logic          quiet, quiet_q;
  logic [CW-1:0] edges_now;

  assign quiet      = (&pe_idle) && (in_flight == '0);
  assign start_prop = (state == S_START);
  assign apply      = (state == S_APPLY);
  assign busy       = (state != S_IDLE);

  always_comb begin
    edges_now = '0;
    for (int i = 0; i < NUM_PE; i++) edges_now = edges_now + CW'(pe_edges[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      quiet_q    <= 1'b0;
      done       <= 1'b0;
      supersteps <= '0;
      cycles     <= '0;
      edges      <= '0;
      in_flight  <= '0;
    end else begin
      in_flight <= in_flight + CW'($countones(pkt_sent)) - CW'($countones(pkt_recv));
      if (busy) begin
        cycles <= cycles + 1'b1;
        edges  <= edges + edges_now;
      end
      unique case (state)
        S_IDLE:
          if (start) begin
            state      <= S_START;
            done       <= 1'b0;
            supersteps <= '0;
            cycles     <= '0;
            edges      <= '0;
          end
        S_START: begin
          quiet_q <= 1'b0;
          state   <= S_RUN;
        end
        S_RUN: begin
          quiet_q <= quiet;
          if (quiet && quiet_q) state <= S_APPLY;
        end
        S_APPLY: state <= S_CHECK;
        default: begin  // S_CHECK
          supersteps <= supersteps + 1'b1;
          if ((|pe_active) && (max_supersteps == '0 || supersteps + 1'b1 < max_supersteps))
            state <= S_START;
          else begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) !(start_prop && apply));
endmodule
