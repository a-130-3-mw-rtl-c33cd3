// lod_bias_buffer: storage of the texture complexity map used by
// approximated texturing (Sec. V, Fig. 10, 11).
//
// Holds one 2-bit LOD bias (0 = original texture fetch .. 3 = three levels
// coarser) per texel of every mipmap level of a texture of size
// 2^TEX_LOG2 x 2^TEX_LOG2, the same dimensions as the mipmap pyramid as the
// source describes. Level k starts at entry off(k) = sum_{j<k} 4^(TEX_LOG2-j)
// and is row-major. The map is computed offline by the driver (wavelet energy
// of the mip level, eq. (3)-(5)) and loaded through the write port, sixteen
// entries per 32-bit word (entry i of a word in bits 2i+1:2i). The lookup
// (level, x, y) is registered: bias is valid one cycle after rd_en.
module lod_bias_buffer #(
  parameter int unsigned TEX_LOG2 = 8,
  localparam int unsigned ENTRIES = ((1 << (2*TEX_LOG2 + 2)) - 1) / 3,
  localparam int unsigned WORDS   = (ENTRIES + 15) / 16,
  localparam int unsigned WAW     = $clog2(WORDS)
) (
  input  logic           clk,
  input  logic           wr_en,
  input  logic [WAW-1:0] wr_addr,
  input  logic [31:0]    wr_data,
  input  logic           rd_en,
  input  logic [3:0]     rd_level,
  input  logic [15:0]    rd_x,
  input  logic [15:0]    rd_y,
  output logic [1:0]     bias
);
  logic [31:0] mem [WORDS];
  logic [31:0] entry;

  always_comb begin
    logic [31:0] off;
    off = 0;
    for (int j = 0; j < 16; j++)
      if (j < int'(rd_level) && j <= int'(TEX_LOG2)) off = off + (32'd1 << (2 * (TEX_LOG2 - j)));
    entry = off + (32'(rd_y) << (5'(TEX_LOG2) - 5'(rd_level))) + 32'(rd_x);
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) bias <= mem[WAW'(entry >> 4)][entry[3:0]*2 +: 2];
  end
endmodule
