// interpolation_unit: the raster's 16-pixel interpolator.
//
// Given the stored scalar values of the leftmost column of an 8x4 tile and
// the plane's x-increment M, it produces one scalar for a 4x4 half tile
// (16 pixels) in parallel using eq. (2), s(x+i, y) = s(x, y) + i*M; the
// multiples i*M (i = 0..7) are formed with shifts and adds. half = 0 selects
// columns 0..3, half = 1 columns 4..7. Inputs are signed Q24.24, outputs are
// signed Q16.16 (truncated) with index j*4+i for row j, column i of the
// half tile. Purely combinational.
module interpolation_unit
  import gpu_pkg::*;
(
  input  logic signed [47:0] left_col [TILE_H],
  input  logic signed [47:0] plane_m,
  input  logic               half,
  output logic signed [31:0] value [16]
);
  always_comb begin
    for (int j = 0; j < 4; j++) begin
      for (int i = 0; i < 4; i++) begin
        logic signed [47:0] step, v;
        // (half*4 + i) * M with shifts and adds
        step = (i[0] ? plane_m : 48'sd0) + (i[1] ? (plane_m <<< 1) : 48'sd0) +
               (half ? (plane_m <<< 2) : 48'sd0);
        v = left_col[j] + step;
        value[j*4 + i] = 32'(v >>> 8);
      end
    end
  end
endmodule
