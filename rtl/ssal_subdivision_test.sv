// ssal_subdivision_test: screen-space subdivision test of the SSAL technique.
//
// From the 32-bit valid map of an 8x4 tile it decides, with simple logic on
// fixed pixel positions, which pixels are shaded by a pixel thread and how
// each remaining covered pixel is approximated (Sec. VI, Fig. 15(a)):
//  * each 4x4 half tile whose four corner pixels are covered: the corners are
//    shaded, the other 12 pixels get the least-squares plane (PR_PLANE);
//  * otherwise per 2x2 block: with 4 covered pixels the main diagonal is
//    shaded and the other two take the average of the two (PR_AVG2, 2x2
//    interpolation); with 3 covered, the covered diagonal pair is shaded and
//    the third averages them (partial 2x2); with 2 adjacent covered pixels
//    (1x2 or 2x1) the first in raster order is shaded and the other copies it
//    (PR_SPLAT, one-point splat); a covered diagonal pair or a single pixel
//    is shaded.
// The choice of the main diagonal, of the shaded pixel of a 1x2/2x1 pair and
// of shading a lone diagonal pair are this design's readings of the figure.
// With ssal_en low every covered pixel is shaded. Combinational.
module ssal_subdivision_test
  import gpu_pkg::*;
(
  input  logic                ssal_en,
  input  logic [TILE_PIX-1:0] valid_map,
  output pix_role_e           role [TILE_PIX]
);
  function automatic int idx(input int c, input int r);
    return r * TILE_W + c;
  endfunction

  always_comb begin
    int p00, p10, p01, p11, c0;
    logic v00, v10, v01, v11;
    c0 = 0;
    p00 = 0; p10 = 0; p01 = 0; p11 = 0;
    v00 = 1'b0; v10 = 1'b0; v01 = 1'b0; v11 = 1'b0;
    for (int p = 0; p < TILE_PIX; p++) role[p] = valid_map[p] ? PR_SHADE : PR_NONE;
    if (ssal_en) begin
      for (int h = 0; h < 2; h++) begin
        c0 = h * 4;
        if (valid_map[idx(c0, 0)] && valid_map[idx(c0 + 3, 0)] &&
            valid_map[idx(c0, 3)] && valid_map[idx(c0 + 3, 3)]) begin
          for (int r = 0; r < 4; r++)
            for (int c = 0; c < 4; c++)
              role[idx(c0 + c, r)] = ((r == 0 || r == 3) && (c == 0 || c == 3)) ? PR_SHADE : PR_PLANE;
        end else begin
          for (int br = 0; br < 2; br++) begin
            for (int bc = 0; bc < 2; bc++) begin
              p00 = idx(c0 + 2*bc,     2*br);
              p10 = idx(c0 + 2*bc + 1, 2*br);
              p01 = idx(c0 + 2*bc,     2*br + 1);
              p11 = idx(c0 + 2*bc + 1, 2*br + 1);
              v00 = valid_map[p00]; v10 = valid_map[p10];
              v01 = valid_map[p01]; v11 = valid_map[p11];
              if (v00 && v11) begin
                // main diagonal sampled; other covered pixels averaged
                if (v10) role[p10] = PR_AVG2;
                if (v01) role[p01] = PR_AVG2;
              end else if (v10 && v01) begin
                if (v00) role[p00] = PR_AVG2;
                if (v11) role[p11] = PR_AVG2;
              end else begin
                // at most one pixel of each diagonal: a 1x2 or 2x1 pair or one pixel
                if (v00 && v10) role[p10] = PR_SPLAT;
                else if (v00 && v01) role[p01] = PR_SPLAT;
                else if (v10 && v11) role[p11] = PR_SPLAT;
                else if (v01 && v11) role[p11] = PR_SPLAT;
              end
            end
          end
        end
      end
    end
  end
endmodule
