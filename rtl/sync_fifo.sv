// sync_fifo: synchronous first-in first-out buffer with a valid/ready handshake on both sides.
//
// in_valid && in_ready pushes in_data; out_valid && out_ready pops out_data, which is the
// oldest entry and is visible combinationally while out_valid is high (no added latency).
// in_ready is low when the FIFO is full, so a full FIFO takes a new word only in the cycle after
// a pop. DEPTH must be a power of two.
// The PE has five of these (the FIFO count of the GraphWave architecture); their depth is this design's choice.
module sync_fifo #(
  parameter int WIDTH = 58,
  parameter int DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             empty
);
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             push, pop;

  assign empty     = (wptr == rptr);
  assign in_ready  = !((wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]));
  assign out_valid = !empty;
  assign out_data  = mem[rptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  assert property (@(posedge clk) disable iff (!rst_n) (AW+1)'(wptr - rptr) <= (AW+1)'(DEPTH));
endmodule
