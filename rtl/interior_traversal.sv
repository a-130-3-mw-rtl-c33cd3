// interior_traversal: second level of the tile scan for one 8x4 tile.
//
// Evaluates the three edge equations at the 32 pixels of the tile and
// records the covered ones as a binary valid map (bit r*8+c for column c,
// row r; a pixel is covered when all edges are >= 0 and it lies on the
// screen). From one plane equation s = M*x + N*y + C it also produces the
// scalar values of the four pixels of the leftmost tile column, which the
// raster stores in the tile scalar value SRAM for the interpolation unit
// (Sec. III-B). Values are signed Q24.24 as produced by triangle_setup.
// Purely combinational; the raster registers the results.
module interior_traversal
  import gpu_pkg::*;
#(
  parameter int unsigned SCREEN_W = 512,
  parameter int unsigned SCREEN_H = 512
) (
  input  logic [15:0]        tile_x,
  input  logic [15:0]        tile_y,
  input  logic signed [31:0] alpha [3],
  input  logic signed [31:0] beta  [3],
  input  logic signed [31:0] gamma [3],
  input  logic signed [47:0] plane_m,
  input  logic signed [47:0] plane_n,
  input  logic signed [47:0] plane_c,
  output logic [TILE_PIX-1:0] valid_map,
  output logic signed [47:0] left_col [TILE_H]
);
  always_comb begin
    for (int r = 0; r < TILE_H; r++) begin
      for (int c = 0; c < TILE_W; c++) begin
        logic in;
        int px, py;
        px = int'(tile_x) * TILE_W + c;
        py = int'(tile_y) * TILE_H + r;
        in = (px < int'(SCREEN_W)) && (py < int'(SCREEN_H));
        for (int e = 0; e < 3; e++)
          if (alpha[e] * 32'(px) + beta[e] * 32'(py) + gamma[e] < 0) in = 1'b0;
        valid_map[r*TILE_W + c] = in;
      end
    end
    for (int r = 0; r < TILE_H; r++)
      left_col[r] = plane_m * 48'(int'(tile_x) * TILE_W) +
                    plane_n * 48'(int'(tile_y) * TILE_H + r) + plane_c;
  end
endmodule
