// vpu: Vertex Processing Unit, the compute-at-memory element that holds one vertex.
//
// Reduce: every cycle in which msg_we is high, the ALU combines msg_val with the accumulator
// (sum for PageRank, minimum for BFS and connected components) and writes the accumulator back.
// Apply: on the apply pulse, at the end of the superstep, the output register (the vertex value)
// is updated from the accumulator with the Apply rule of the selected algorithm:
//   PR : val = (alpha + (1 - alpha) * acc) / degree      (Q16.16, acc cleared afterwards)
//   BFS: val = acc                                        (acc kept)
//   CC : val = min(acc, val)                              (acc kept)
// The outbound register holds the vertex's route. On start_prop an active vertex with a route
// raises req; the PE's arbiter answers with grant, which takes the message {outbound, value}.
// While the vertex propagates its output register, it keeps reducing new messages.
//
// A VPU configured as a relay (an unmapped VPU used for in-flight reduction) does not apply:
// it collects messages from the vertices of its own PE, and on the PE's flush pulse it offers
// its accumulator as one message on its own route, then returns the accumulator to the
// identity (0 or all-ones).
//
// Follows the GraphWave architecture: Reduce/Apply rules of the three algorithms, accumulator and output register,
// outbound register, relay use of unused VPUs. This design's own choices: the BFS message is
// val + 1 (the level of the next vertex), "active" (the vertex changed in the last Apply) gates
// propagation for BFS and CC, PR vertices are always active, Q16.16 arithmetic, and the
// req/grant handshake. All state changes on the rising clock edge; rst_n is asynchronous,
// active low.
module vpu
  import graphwave_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  alg_e             alg,
  input  logic [VAL_W-1:0] pr_alpha,    // Q16.16
  // load
  input  logic             cfg_we,
  input  vpu_cfg_t         cfg_in,
  input  logic             init_we,
  input  vpu_init_t        init_in,
  // reduce
  input  logic             msg_we,
  input  logic [VAL_W-1:0] msg_val,
  // superstep control
  input  logic             start_prop,
  input  logic             apply,
  input  logic             flush,
  // propagate handshake
  output logic             req,
  input  logic             grant,
  output msg_t             out_msg,
  output logic             is_relay,
  // state
  output logic [VAL_W-1:0] val,
  output logic             active
);

  vpu_cfg_t         cfg;
  logic [VAL_W-1:0] acc;
  logic             got;      // relay: accumulator holds something to send
  logic             pending;

  logic             use_min;
  logic [VAL_W-1:0] identity;
  logic [VAL_W-1:0] reduce_in;  // accumulator after a relay send
  logic [VAL_W-1:0] reduced;
  logic [2*VAL_W-1:0] pr_prod;
  logic [VAL_W-1:0] pr_num;
  logic [VAL_W-1:0] pr_val;
  logic [VAL_W-1:0] cc_val;
  logic [VAL_W-1:0] send_val;
  logic             send;

  assign use_min  = (alg != ALG_PR);
  assign identity = use_min ? VAL_INF : '0;
  assign send     = grant && pending;
  assign reduce_in = (send && cfg.relay) ? identity : acc;

  // Reduce ALU
  always_comb begin
    if (use_min) reduced = (msg_val < reduce_in) ? msg_val : reduce_in;
    else         reduced = reduce_in + msg_val;
  end

  // Apply datapath
  always_comb begin
    pr_prod = (2*VAL_W)'(FX_ONE - pr_alpha) * (2*VAL_W)'(acc);
    pr_num  = pr_alpha + pr_prod[VAL_W+15:16];
    pr_val  = (cfg.degree != '0) ? pr_num / VAL_W'(cfg.degree) : pr_num;
    cc_val  = (acc < val) ? acc : val;
  end

  // Outgoing value
  always_comb begin
    if (cfg.relay)                 send_val = acc;
    else if (alg == ALG_BFS)       send_val = (val == VAL_INF) ? VAL_INF : val + 1'b1;
    else                           send_val = val;
  end

  assign req      = pending;
  assign is_relay = cfg.relay;
  assign out_msg  = '{route: cfg.outbound, val: send_val};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg     <= '0;
      acc     <= '0;
      val     <= '0;
      active  <= 1'b0;
      got     <= 1'b0;
      pending <= 1'b0;
    end else if (cfg_we) begin
      cfg <= cfg_in;
    end else if (init_we) begin
      val     <= init_in.val;
      active  <= init_in.active;
      acc     <= (cfg.relay || alg != ALG_PR) ? (cfg.relay ? identity : init_in.val) : '0;
      got     <= 1'b0;
      pending <= 1'b0;
    end else if (cfg.enable) begin
      // reduce (and relay send)
      if (msg_we) begin
        acc <= reduced;
        got <= cfg.relay;
      end else if (send && cfg.relay) begin
        acc <= identity;
        got <= 1'b0;
      end
      if (send) pending <= 1'b0;

      if (start_prop)
        pending <= !cfg.relay && active && (cfg.outbound.kind != K_NONE);
      else if (flush && cfg.relay)
        pending <= got && (cfg.outbound.kind != K_NONE);

      // apply
      if (apply && !cfg.relay) begin
        unique case (alg)
          ALG_PR: begin
            val    <= pr_val;
            acc    <= '0;
            active <= 1'b1;
          end
          ALG_BFS: begin
            val    <= acc;
            active <= (acc != val);
          end
          default: begin
            val    <= cc_val;
            active <= (cc_val != val);
          end
        endcase
      end
    end
  end

  // a relay never applies; a grant only answers a request
  assert property (@(posedge clk) disable iff (!rst_n) grant |-> pending);

endmodule
