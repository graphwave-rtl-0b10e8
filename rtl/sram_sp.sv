// sram_sp: single-port synchronous SRAM, the storage of the bit-masking table, the inter
// table and the address tables of the two address generators.
//
// One port: with en high, we high writes wdata at addr; with en high and we low, the word at
// addr appears on rdata on the next rising edge (one-cycle read latency). rdata holds its last
// value otherwise. The contents are not reset; they are loaded before use. The GraphWave architecture says
// these tables are single-port low-power SRAM macros; this array is the synthesizable
// equivalent (a memory compiler would replace it).
module sram_sp #(
  parameter int WIDTH = 256,
  parameter int DEPTH = 8192,
  parameter int AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             en,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
