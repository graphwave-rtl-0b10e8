// noc_model: behavioural stand-in for the mesh network-on-chip between the PEs (testbench only).
//
// Each cycle it takes the packet offered by every PE (with a random 10% of cycles not ready,
// to exercise back-pressure), and delivers it to the destination PE's ejection port LAT to
// LAT + 3 cycles later, in order per destination, as fast as the PE accepts. It counts
// packets and flags any packet whose destination is not a mesh neighbour of its source, since
// the mapping only ever sends packets one hop.
module noc_model
  import graphwave_pkg::*;
#(
  parameter int NUM_PE = 6,
  parameter int COLS   = 3,
  parameter int LAT    = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_PE-1:0] out_valid,
  output logic [NUM_PE-1:0] out_ready,
  input  pkt_t              out_pkt [NUM_PE],
  output logic [NUM_PE-1:0] in_valid,
  input  logic [NUM_PE-1:0] in_ready,
  output pkt_t              in_pkt [NUM_PE],
  output int                delivered,
  output int                not_neighbour
);
  typedef struct {
    pkt_t    p;
    longint  t;
  } entry_t;

  entry_t q [NUM_PE][$];
  longint cyc = 0;

  function automatic int hops(int a, int b);
    int dr, dc;
    dr = a / COLS - b / COLS; dc = a % COLS - b % COLS;
    return (dr < 0 ? -dr : dr) + (dc < 0 ? -dc : dc);
  endfunction

  always_comb begin
    for (int d = 0; d < NUM_PE; d++) begin
      in_valid[d] = (q[d].size() != 0) && (q[d][0].t <= cyc);
      in_pkt[d]   = (q[d].size() != 0) ? q[d][0].p : '0;
    end
  end

  always @(posedge clk) begin
    if (!rst_n) begin
      out_ready     <= '1;
      delivered     <= 0;
      not_neighbour <= 0;
    end else begin
      cyc <= cyc + 1;
      for (int d = 0; d < NUM_PE; d++)
        if (in_valid[d] && in_ready[d]) begin
          void'(q[d].pop_front());
          delivered <= delivered + 1;
        end
      for (int s = 0; s < NUM_PE; s++)
        if (out_valid[s] && out_ready[s]) begin
          entry_t e;
          int d;
          d = int'(out_pkt[s].dest);
          e.p = out_pkt[s];
          e.t = cyc + LAT + $urandom_range(3);
          if (q[d].size() != 0 && q[d][$].t > e.t) e.t = q[d][$].t;
          q[d].push_back(e);
          if (hops(s, d) != 1) not_neighbour <= not_neighbour + 1;
        end
      for (int s = 0; s < NUM_PE; s++) out_ready[s] <= ($urandom_range(9) != 0);
    end
  end
endmodule
