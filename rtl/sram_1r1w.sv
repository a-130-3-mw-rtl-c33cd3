// sram_1r1w: synchronous single-port-read, single-port-write memory.
//
// Used for the raster's intermediate plane equation SRAM and tile scalar
// value SRAM and for the LOD bias storage. Write: we/waddr/wdata at the
// clock edge. Read: raddr is sampled at the clock edge and rdata is valid
// the next cycle (one-cycle read latency, like a compiled SRAM macro).
// A read of the address written in the same cycle returns the old word.
// Depth and width are parameters; the source gives neither.
module sram_1r1w #(
  parameter int unsigned DEPTH = 64,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
